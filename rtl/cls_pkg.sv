// Shared types and constants of the trie-based forwarding / classification engine.
//
// The engine walks a 16-way trie whose topology is stored as one 16-bit word per
// internal node: bit i of a word is 1 when the child reached by key nibble i is an
// internal node and 0 when it is a leaf. The 16-way degree, the four stages of eight
// levels each, the IPv4/IPv6 key lengths and the eight software-defined address spaces
// follow the design description. The two index fields stored next to each topology word
// (child_base, leaf_base), the context and result records and the configuration bus
// layout are choices of this implementation.
package cls_pkg;

  localparam int DEGREE     = 16;            // trie degree (16-way)
  localparam int NIB_W      = 4;             // log2(DEGREE): key bits consumed per level
  localparam int NSTAGE     = 4;             // pipeline stages (levels 0-7, 8-15, 16-23, 24-31)
  localparam int LVL_PER_ST = 8;             // trie levels held by one stage
  localparam int NUM_AS     = 8;             // software-defined address spaces
  localparam int NUM_BANKS  = NUM_AS + 1;    // address spaces plus one spare for swapping
  localparam int BANK_W     = 4;
  localparam int WORD_AW    = 16;            // local word index inside one stage partition
  localparam int LEAF_W     = 22;            // leaf index inside one trie (DRAM / rule pointer)
  localparam int TAG_W      = 5;             // packet tag, up to 32 packets in flight
  localparam int CFG_AW     = 24;
  localparam int CFG_DW     = 160;

  // One trie SRAM word.
  typedef struct packed {
    logic [DEGREE-1:0]  bits;        // 1 = child is internal, 0 = child is a leaf
    logic [WORD_AW-1:0] child_base;  // word index (next level's stage) of the first internal child
    logic [LEAF_W-1:0]  leaf_base;   // leaf index of the first leaf child
  } trie_word_t;

  localparam int TW_W = $bits(trie_word_t);

  // Per-packet lookup context carried between stages.
  typedef struct packed {
    logic [TAG_W-1:0]   tag;
    logic               ipv6;
    logic               cls;     // 0 forwarding, 1 firewall/diffserv classification
    logic               dfirst;  // classification: first trie on the destination address
    logic [BANK_W-1:0]  bank;    // physical memory bank selected at entry
    logic [127:0]       src;     // IPv4 address in bits [31:0]
    logic [127:0]       dst;
    logic               trie;    // classification: 0 source trie, 1 destination trie
    logic [4:0]         level;   // level inside the current trie
    logic [WORD_AW-1:0] word;    // word index of the node being visited
  } ctx_t;

  localparam int CTX_W = $bits(ctx_t);

  typedef enum logic [1:0] {
    RES_FWD = 2'd0,   // forwarding leaf found: leaf is the next-hop DRAM index
    RES_CLS = 2'd1,   // destination-trie leaf found: leaf is the rule pointer
    RES_ERR = 2'd2    // trie deeper than the key (corrupt table)
  } res_kind_e;

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    res_kind_e         kind;
    logic              cls;
    logic [BANK_W-1:0] bank;
    logic [LEAF_W-1:0] leaf;
  } result_t;

  localparam int RES_W = $bits(result_t);

  // Fields compared after the destination trie (protocol, ports, ToS, DSCP, flags).
  typedef struct packed {
    logic [7:0]  proto;
    logic [15:0] sport;
    logic [15:0] dport;
    logic [7:0]  tos;
    logic [7:0]  flags;
  } hdr_t;

  localparam int HDR_W = $bits(hdr_t);

  // One rule record of the rule memory.
  typedef struct packed {
    logic        valid;
    logic [7:0]  proto;
    logic [7:0]  proto_mask;
    logic [15:0] sport_lo;
    logic [15:0] sport_hi;
    logic [15:0] dport_lo;
    logic [15:0] dport_hi;
    logic [7:0]  tos;
    logic [7:0]  tos_mask;
    logic [5:0]  dscp;
    logic [5:0]  dscp_mask;
    logic [7:0]  flags;
    logic [7:0]  flags_mask;
    logic [7:0]  action;
  } rule_t;

  localparam int RULE_W = $bits(rule_t);

  // Configuration bus targets.
  typedef enum logic [2:0] {
    CFG_ENGINE = 3'd0,   // addr 0: mode (0 forwarding, 1 classification)
    CFG_ASSEL  = 3'd1,   // address-space selector registers
    CFG_MEM0   = 3'd2,   // stage s trie memory: addr = bank*WORDS<s> + word
    CFG_MEM1   = 3'd3,
    CFG_MEM2   = 3'd4,
    CFG_MEM3   = 3'd5,
    CFG_RULE   = 3'd6,   // rule memory: addr = rule index
    CFG_RDEF   = 3'd7    // default action when no rule matches
  } cfg_sel_e;

  typedef struct packed {
    logic              we;
    cfg_sel_e          sel;
    logic [CFG_AW-1:0] addr;
    logic [CFG_DW-1:0] wdata;
  } cfg_t;

  // Key nibble used at a given level: IPv4 keys are left-aligned into 128 bits.
  function automatic logic [NIB_W-1:0] key_nibble(input logic [127:0] addr, input logic ipv6,
                                                  input logic [4:0] level);
    logic [127:0] k;
    k = ipv6 ? addr : {addr[31:0], 96'b0};
    return NIB_W'(k >> (7'd124 - {level, 2'b00}));
  endfunction

  // Stage that holds a given level of a given trie.
  function automatic logic [1:0] stage_of(input logic cls, input logic ipv6, input logic trie,
                                          input logic [4:0] level);
    if (!cls)      return level[4:3];                 // forwarding: 8 levels per stage
    else if (!ipv6) return {1'b0, trie};              // IPv4: source in 0, destination in 1
    else            return {trie, level[3]};          // IPv6 /64: source 0-1, destination 2-3
  endfunction

  // Last level a trie may have for this kind of lookup.
  function automatic logic [4:0] last_level(input logic cls, input logic ipv6);
    if (!ipv6)     return 5'd7;
    else if (!cls) return 5'd31;
    else           return 5'd15;
  endfunction

endpackage
