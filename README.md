# Trie-based forwarding and classification engine

This is a pipelined lookup coprocessor for a network processor. It does three jobs
on one datapath: IPv4/IPv6 route lookup (forwarding), firewall filtering, and
differentiated-services (diffserv) classification. All three reduce to walking
*compacted 16-way tries*. A trie's shape is stored on chip as one 16-bit word per
internal node. Forwarding ends in an index into an off-chip next-hop DRAM.
Classification walks a source-address trie, then a destination-address trie chosen
by the source leaf. The destination leaf points to a rule record, and the remaining
header fields are compared against it directly.

The walk is split over four pipeline stages. Each stage owns the memory for eight
trie levels. Software sets the memory up: it chooses the address spaces, loads the
tries and rules, and swaps in rebuilt tables through a spare bank.

Top module: `cls_engine` (`rtl/cls_engine.sv`). Shared types: `rtl/cls_pkg.sv`.

## Compacted trie words

Each lookup key is consumed one nibble (4 bits) per trie level. IPv4 keys are
left-aligned, so level 0 uses the top nibble of the first octet. An IPv4 trie is
therefore at most 8 levels deep, and an IPv6 trie at most 32.

Each internal node occupies one memory word (`trie_word_t`, 54 bits):

| field        | bits | meaning |
|--------------|------|---------|
| `bits`       | 16   | bit *i* = 1 if the child for nibble *i* is an internal node, 0 if it is a leaf |
| `child_base` | 16   | word index, in the stage holding the next level, of this node's first internal child |
| `leaf_base`  | 22   | leaf index of this node's first leaf child |

The tables are built *leaf-pushed*, so every internal node has all 16 children and
every leaf carries the result of its longest matching prefix. Let the nibble be *n*
and let `ones` = popcount(`bits` & ((1<<n)−1)). Then:

- if `bits[n]` = 1, the next node is word `child_base + ones`;
- otherwise the walk ends at leaf `leaf_base + (n − ones)`.

Siblings are therefore packed consecutively, both among internal words and among
leaves. A breadth-first layout meets this rule directly.

The 16 topology bits are the compact part of the scheme. Storing the two base fields
in every word is this design's own way of turning the ones count into an address.
It replaces a separate per-level table of offsets. It costs 38 extra bits per word,
but needs no second memory read per level.

### Building the tables

`tb/trie_image_pkg.sv` builds the tables the way host software would:

1. Insert prefixes in order of increasing length.
2. A prefix that ends inside a nibble is expanded to all 2^(4−r) children that share
   its leading r bits.
3. A leaf met on the way is split into 16 children that inherit its value.
4. Lay the trie out breadth-first. Each internal node gets the next free word in the
   stage that owns its level. Its internal children get consecutive words and its
   leaves get consecutive leaf indices.

Trie depth is (address bits)/log2(16): 8 for IPv4 and 32 for IPv6. Building N
prefixes costs at most N·depth node visits.

## Stage ring (`lookup_stage`)

A stage resolves one level per pass around a four-phase ring:

| phase | block | work |
|-------|-------|------|
| P0 | SRAM access (`trie_mem`) | read the current word; synchronous, result in P1 |
| P1 | mask generation (`mask_gen`) | select the key nibble and form the mask below it |
| P2 | sum of 1's (`ones_sum`) | popcount, then form the next word or leaf index |
| P3 | final state (`final_state`) | loop, hand off, or complete |

Each phase holds one packet context, so up to four packets share a stage. The memory
is read by exactly one of them per cycle, so there is never contention.

One level costs 4 cycles:
- A full IPv4 walk (8 levels) takes 32 cycles.
- An IPv6 /64 walk (16 levels over two stages) takes 64 cycles.

A walk stops as soon as it reaches a leaf, so lookup time is not constant.

Flow control:
- A new context enters P0 only when the slot coming out of P3 is empty.
  `in_ready` is low while a context loops.
- A context whose handoff or result is refused stays in its slot with a *hold* flag
  and retries 4 cycles later. Nothing is ever dropped.

**Stage timing.** A stage accepts a new packet whenever the entry slot is free. It is
not paced to a fixed interval of one packet every 9 cycles. With four contexts per
ring, full-depth IPv4 traffic runs at one lookup per 8 cycles per stage.

## Stage split and handoffs

| stage | forwarding levels | IPv4 classification | IPv6 classification (/64) |
|-------|-------------------|---------------------|---------------------------|
| 0 | 0–7   | source trie       | source levels 0–7 |
| 1 | 8–15  | destination trie  | source levels 8–15 |
| 2 | 16–23 | –                 | destination levels 0–7 |
| 3 | 24–31 | –                 | destination levels 8–15 |

Forwarding walks the **destination** address. IPv4 forwarding never leaves stage 0.

Handoff paths:
- stage 0 → stage 1;
- stage 0 → stage 2 (IPv6 classification with a source leaf in levels 0–7);
- stage 1 → stage 2, merged with the path above by a round-robin arbiter (`ctx_arb`);
- stage 2 → stage 3.

The results of all four stages are merged by a second round-robin arbiter.

An internal node at the last level a key allows (level 7, 15 or 31) means the table
is corrupt. It is reported as an error result.

## Array of tries (firewall / diffserv)

The classification table for one protocol group is a source-address trie. Each
source leaf owns a destination-address trie built from the rules that share that
source prefix.

The destination trie for source leaf *k* has its root at word *k* of the
destination stage. Root words are duplicated per source leaf, and deeper nodes may
be shared. When the source walk ends at leaf *k*, the context restarts at level 0 of
the destination trie at word *k*.

An address space can instead be built *destination-first*: one order bit per space,
register 0x203 of the selector. Its first trie then walks the destination address
and each destination leaf owns a trie over source addresses. This suits rule sets
whose destination addresses are more distinct than their source addresses. The datapath is the same; only
the key nibble source swaps.

Each second-trie leaf index selects an entry of the leaf pointer table (see below),
which names a rule record. Address ranges must be expanded to prefixes by software.
IPv6 classification uses the first 64 bits of each address.

## Rule comparison (`rule_cmp`, `hdr_buf`)

While a packet walks its tries, its other fields wait in `hdr_buf`, indexed by tag.
Those fields are protocol, source and destination port, ToS byte and TCP flags.

A leaf-pushed trie has about 15 leaves per internal word, and many of them carry
the same rule. The second-trie leaf therefore does not address a rule directly. It
indexes a leaf pointer table (`LEAVES` = 737280 entries of {valid, rule index}). That
entry names a record in the rule memory.

The rule memory (`RULES` = 20000 records, `rule_t`) holds, per record:
- a valid bit;
- protocol value and mask;
- source port range (lo/hi) and destination port range (lo/hi);
- ToS value and mask;
- DSCP value and mask, compared with ToS[7:2];
- flags value and mask;
- an 8-bit action.

All fields must match for `cls_match` = 1 and the record's action. Otherwise the
software-set default action is returned. That happens for:
- a failed comparison;
- an invalid pointer or an invalid record;
- a leaf at or beyond `LEAVES`, or a rule index at or beyond `RULES`;
- a trie error.

Ports are compared as ranges directly, so port ranges need no prefix expansion. The
lookup has three steps, one per cycle: read the pointer, read the rule and the
header, compare. The result appears 3 cycles after the destination leaf arrives.

## Address spaces, spare bank and configuration (`as_select`)

Each stage memory holds 9 banks: 8 logical address spaces plus a spare. A bank of
stage *s* has `WORDS`*s* words:

| stage | levels | words per bank | why |
|-------|--------|----------------|-----|
| 0 | 0–7   | `WORDS0` = 65536 | all of IPv4, and the peak of IPv4 prefixes at /24 |
| 1 | 8–15  | `WORDS1` = 40960 | IPv6 up to the peak of prefixes at /64 |
| 2 | 16–23 | `WORDS2` = 20480 | |
| 3 | 24–31 | `WORDS3` = 20480 | |

That makes 147456 16-bit topology words, or 288 KB, per space. 65536 is also the
most that a 16-bit word index can address.

**Space selection:**
- Forwarding counts how many software-set first-octet boundaries the key's first
  octet is at or above. IPv4 and IPv6 have separate sets of up to 8 boundaries, and
  IPv6 spaces start at `v6_base`.
- Classification looks the space up in a 512-entry table indexed by {IPv6, protocol}.

**Bank swap.** A logical space maps to a physical bank through `bank_map`. To update
a table, software writes the rebuilt trie into the spare bank and then rewrites one
map entry. A packet latches its bank when it enters, so lookups in flight finish on
the old table.

**Reset state.** There is one space, with an identity bank map.

**Configuration bus** `cfg_t {we, sel[2:0], addr[23:0], wdata[159:0]}`. A write
happens in the cycle `we` is high.

| `sel` | target | address | data |
|-------|--------|---------|------|
| 0 `CFG_ENGINE` | mode register | 0 | `wdata[0]`: 0 forwarding, 1 classification |
| 1 `CFG_ASSEL` | selector | `addr[10]`=1: proto_map[`addr[8:0]`]; `addr[9:8]`=0/1: IPv4/IPv6 bound[`addr[2:0]`]; 2: 0x200 count_v4, 0x201 count_v6, 0x202 v6_base, 0x203 destination-first bits; 3: bank_map[`addr[2:0]`] | low bits |
| 2–5 `CFG_MEM0..3` | stage *s* trie memory | bank·`WORDS`*s* + word | `trie_word_t` |
| 6 `CFG_RULE` | rule record / leaf pointer | `addr[23]`=0: rule index; `addr[23]`=1: leaf index | `rule_t` / {valid, rule index[14:0]} |
| 7 `CFG_RDEF` | default action | – | `wdata[7:0]` |

Change the mode only while no lookup is in flight.

## Interface and timing (`cls_engine`)

**Requests.** Requests use valid/ready: `req_valid`, `req_ready`, `req_tag` (5 bits),
`req_ipv6`, `req_src`, `req_dst` (IPv4 in bits [31:0]) and `req_hdr`. A tag must not
be reused while its packet is in flight, so at most 32 packets can be outstanding.
There is no back-pressure on the outputs.

**Forwarding result.**
- Signals: `fwd_valid`, `fwd_tag`, `fwd_err`, and `fwd_dram_addr` = {bank[3:0], leaf[21:0]}.
- `fwd_dram_addr` is the next-hop DRAM index. The DRAM itself is outside the engine.
- A lookup that ends at level L, with no queueing, shows on the outputs
  4·(L+1)+1 cycles after the accepting clock edge.

**Classification result.**
- Signals: `cls_valid`, `cls_tag`, `cls_err`, `cls_match` and `cls_action`.
- The timing is the source walk, plus the destination walk, plus 3 cycles (source and destination walks swap
  for a destination-first space).

Results come back out of order.

## Sizes

All counts below are defaults.

- 9 banks × 147456 words × 54 bits ≈ 71.7 Mbit of trie memory over the four stages.
- `RULES` = 20000 records of 133 bits.
- `LEAVES` = 737280 leaf pointers of 16 bits. That is 16 leaves for each word of a
  90 KB rule trie.

A 1-million-entry route table is expected to need about 6 Mbit of topology bits
(about 5.8 bits per entry). With a 3× margin that becomes 18 Mbit.

An IPv4 table lives entirely in stage 0. That is 8 × 65536 words = 8.4 Mbit over
all spaces. This holds the expected 6 Mbit but not the 18 Mbit with margin.

An IPv6 table can use all 8 × 147456 words (18.9 Mbit), but only if its nodes spread
over the levels roughly as the stage sizes do.

Typical rule sets fit as well:
- diffserv: 20000 rules, about 90 KB of trie;
- firewall: 10000 rules, about 45 KB of trie.

In an IPv4 classification space, the source tries use the 65536 words of stage 0.
The destination tries, including one root word per source leaf, must fit the 40960
words of stage 1. A larger set can be split over spaces by protocol.

## Departures from the reference architecture

- Per-word `child_base`/`leaf_base` fields replace a per-level offset table.
- Forwarding walks the destination address.
- Stages accept packets as slots free up, not at one packet every 9 cycles.
- The stage sizes follow the prefix-length argument, but the exact numbers are
  this design's own.
- Port ranges are compared directly rather than expanded into prefixes.
- The leaf pointer table between the destination trie and the rule memory is this
  design's own.
- The following are this design's own: the mode register, tags, out-of-order
  results, the error result and the default action.
- The 2 ns clock target was not timed.
- The DRAM and the table-building software are outside the RTL. The testbenches
  model them.

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

`cls_engine_tb` runs the whole engine at its default sizes:
1. IPv4 and IPv6 forwarding, including prefixes up to /128. This phase checks exact
   latency, then runs a random stream.
2. A spare-bank swap.
3. IPv4 TCP, IPv4 UDP and IPv6 TCP classification. The IPv4 UDP space is built
   destination-first.
4. A return to forwarding, then a corrupt table that provokes the error result.

Expected values come from reference longest-prefix-match and rule-matching code.
The test counts the following events and fails if any of them never happens: ring
stalls, holds, each handoff path, arbiter conflicts, early and deep lookups, rule
hits and misses, destination-first lookups, bank swaps, mode switches and errors.

`cls_workload_tb` runs the target loads at the default sizes. It uses only the
engine's ports.
- It measures full-depth IPv4 lookups at exactly 33 cycles and IPv6 /64 lookups at 65.
- It requires a back-to-back stream to reach at least 28 M lookups/s at 2 ns, which
  is at most 17 cycles per lookup. The stream reaches 8 cycles per lookup.
- It loads a 20000-rule diffserv set and a 10000-rule firewall set, checks that the
  tries fit their stage partitions and the pointer table, and checks the
  classifications.
- It prints the table sizes it built.

To run it with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cls_pkg.sv tb/trie_image_pkg.sv tb/cls_engine_tb.sv --top-module cls_engine_tb
./obj_dir/Vcls_engine_tb
```

Replace `cls_engine_tb` with any other `*_tb` to run a unit test. Smaller sizes for
experiments can be set with `WORDS0`..`WORDS3`/`RULES`/`LEAVES` on `cls_engine`, or `NBANK`/`WORDS` on
`lookup_stage`.
