// End-to-end test of cls_engine at its default sizes.
//
// Software side: random clustered route and rule sets are turned into trie images by
// trie_image_pkg and written through the configuration bus. Next-hop DRAM: a model
// maps the engine's {bank, leaf} DRAM index to the next hop the table builder put
// there. Expected results are computed from the route / rule lists directly
// (longest-prefix match; for rules: most specific source prefix, then most specific
// destination prefix among that source's rules, then the field comparison).
// Sequence:
//   1. forwarding, IPv4 in three first-octet address spaces and IPv6 in two, with
//      prefixes up to /128 so that lookups reach all four stages; single lookups
//      check the latency (4 cycles per level + 1), then a random stream;
//   2. a rebuilt table is loaded into the spare bank and swapped in; lookups must
//      follow the new table;
//   3. mode switch to classification: IPv4 TCP, IPv4 UDP and IPv6 TCP rule sets
//      (array of tries, leaf pointers and rule records); random headers, some made to
//      match; the IPv4 UDP space is built destination-first (its first trie walks the
//      destination address, the second the source);
//   4. mode switch back to forwarding and a corrupt table to provoke the error result.
// Every mechanism of the design is counted and must occur at least once.
module cls_engine_tb;
  import cls_pkg::*;
  import trie_image_pkg::*;

  localparam int WORDS_ST [4] = '{65536, 40960, 20480, 20480};   // defaults of cls_engine
  localparam logic [7:0] DEF_ACT = 8'hEE;

  logic clk = 0, rst_n = 0;
  cfg_t cfg = '0;
  logic req_valid = 0, req_ready;
  logic [TAG_W-1:0] req_tag = '0;
  logic req_ipv6 = 0;
  logic [127:0] req_src = '0, req_dst = '0;
  hdr_t req_hdr = '0;
  logic fwd_valid, fwd_err, cls_valid, cls_err, cls_match;
  logic [TAG_W-1:0] fwd_tag, cls_tag;
  logic [BANK_W+LEAF_W-1:0] fwd_dram_addr;
  logic [7:0] cls_action;

  cls_engine dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .req_valid(req_valid), .req_ready(req_ready), .req_tag(req_tag), .req_ipv6(req_ipv6),
    .req_src(req_src), .req_dst(req_dst), .req_hdr(req_hdr),
    .fwd_valid(fwd_valid), .fwd_tag(fwd_tag), .fwd_err(fwd_err), .fwd_dram_addr(fwd_dram_addr),
    .cls_valid(cls_valid), .cls_tag(cls_tag), .cls_err(cls_err), .cls_match(cls_match),
    .cls_action(cls_action));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_hold = 0, n_ho01 = 0, n_ho02 = 0, n_ho12 = 0, n_ho23 = 0;
  int n_resconf = 0, n_fwd = 0, n_early = 0, n_cls_hit = 0, n_cls_miss = 0;
  int n_swap = 0, n_mode = 0, n_err = 0, n_deep = 0, n_dfirst = 0;
  bit dfirst_of [8];

  always @(posedge clk) if (rst_n) begin
    if (req_valid && !req_ready) n_stall++;
    for (int s = 0; s < 4; s++) begin
      if (dut.st_res_valid[s] && !dut.st_res_ready[s]) n_hold++;
      if (dut.st_ho_valid[s] && !dut.st_ho_ready[s]) n_hold++;
    end
    if (dut.st_ho_valid[0] && dut.st_ho_ready[0] && dut.st_ho_tgt[0] == 2'd1) n_ho01++;
    if (dut.st_ho_valid[0] && dut.st_ho_ready[0] && dut.st_ho_tgt[0] == 2'd2) n_ho02++;
    if (dut.st_ho_valid[1] && dut.st_ho_ready[1]) n_ho12++;
    if (dut.st_ho_valid[2] && dut.st_ho_ready[2]) n_ho23++;
    if ($countones(dut.st_res_valid) > 1) n_resconf++;
  end

  // ---------------- route tables ----------------
  // route r: key (left-aligned), length, next hop = route index + 1
  logic [127:0] rt_key [$];
  int rt_len [$], rt_v6 [$];
  bit rt_alive [$];

  // next-hop DRAM model: bank*2^22 + leaf -> next hop
  int dram [int];

  // rules
  typedef struct {
    int as_id;        // classification address space
    logic [127:0] src; int slen;
    logic [127:0] dst; int dlen;
    rule_t r;
  } rule_rec_t;
  rule_rec_t rules [$];

  function automatic logic [127:0] pmask(int len);
    return (len == 0) ? '0 : ~((128'd1 << (128 - len)) - 128'd1);
  endfunction

  function automatic int lpm(bit v6, logic [127:0] key);
    int best, v;
    best = -1; v = 0;
    for (int i = 0; i < rt_key.size(); i++)
      if (rt_alive[i] && rt_v6[i] == int'(v6) && ((rt_key[i] ^ key) & pmask(rt_len[i])) == '0
          && rt_len[i] >= best) begin
        best = rt_len[i];
        v = i + 1;
      end
    return v;
  endfunction

  task automatic cfg_wr(cfg_sel_e sel, int addr, logic [CFG_DW-1:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.sel = sel; cfg.addr = CFG_AW'(addr); cfg.wdata = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  task automatic load_image(trie_image t, int bank);
    foreach (t.img[k]) begin
      int st, w;
      st = k / 65536;
      w  = k % 65536;
      cfg_wr(cfg_sel_e'(int'(CFG_MEM0) + st), bank*WORDS_ST[st] + w, CFG_DW'(t.img[k]));
    end
  endtask

  // first octet of a left-aligned key decides the forwarding address space
  function automatic int fwd_as(bit v6, logic [127:0] key);
    int o;
    o = int'(key[127:120]);
    if (!v6) return (o >= 128) ? 2 : (o >= 64) ? 1 : 0;
    else     return (o >= 8'h30) ? 4 : 3;
  endfunction

  int bank_of [8];
  trie_image fimg [8];
  int froot [8];

  // build and load the forwarding trie of one address space into a bank
  task automatic build_fwd(int as_id, int bank);
    trie_image t;
    int root;
    bit v6;
    v6 = (as_id >= 3);
    t = new();
    root = t.new_trie(0);
    for (int len = 0; len <= 128; len++)
      for (int i = 0; i < rt_key.size(); i++)
        if (rt_alive[i] && rt_v6[i] == int'(v6) && rt_len[i] == len && fwd_as(v6, rt_key[i]) == as_id)
          t.insert(root, rt_key[i], len, i + 1);
    void'(t.emit(root, 0, v6, 0, 0));
    foreach (t.leafval[l]) dram[bank*(2**LEAF_W) + l] = t.leafval[l];
    load_image(t, bank);
    fimg[as_id] = t;
    froot[as_id] = root;
  endtask

  task automatic add_routes(bit v6, int n);
    logic [127:0] bases [6];
    for (int b = 0; b < 6; b++) bases[b] = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < n; i++) begin
      int len, keep, deep;
      logic [127:0] k, r, m;
      deep = $urandom_range(0, 9);
      if (!v6) len = $urandom_range(8, 32);
      else     len = (deep == 0) ? $urandom_range(65, 128) : $urandom_range(8, 64);
      k    = bases[$urandom_range(0, 5)];
      r    = {$urandom, $urandom, $urandom, $urandom};
      keep = $urandom_range(len/2, len);
      m    = pmask(keep);
      k    = ((k & m) | (r & ~m)) & pmask(len);
      rt_key.push_back(k); rt_len.push_back(len); rt_v6.push_back(int'(v6)); rt_alive.push_back(1);
    end
  endtask

  // ---------------- request / response bookkeeping ----------------
  bit   busy [32];
  bit   e_cls [32];
  int   e_val [32];     // forwarding: next hop; classification: action
  int   e_match [32];
  int   e_lat [32];     // expected latency, -1 when not checked
  int   t_in [32];
  int   n_busy = 0;

  always @(posedge clk) if (rst_n) begin
    if (fwd_valid) begin
      int tg, v;
      tg = int'(fwd_tag);
      checks++;
      if (fwd_err) n_err++;
      v = dram.exists(int'(fwd_dram_addr)) ? dram[int'(fwd_dram_addr)] : -7;
      if (!busy[tg] || e_cls[tg] || (e_val[tg] == -2) != fwd_err
          || (!fwd_err && v != e_val[tg]) || (e_lat[tg] >= 0 && cyc - t_in[tg] != e_lat[tg])) begin
        failures++;
        if (failures < 10) $display("fwd tag %0d: err %0d nh %0d expected %0d lat %0d/%0d",
                                    tg, fwd_err, v, e_val[tg], cyc - t_in[tg], e_lat[tg]);
      end
      if (!fwd_err) n_fwd++;
      busy[tg] = 0;
      n_busy--;
    end
    if (cls_valid) begin
      int tg;
      tg = int'(cls_tag);
      checks++;
      if (cls_match) n_cls_hit++; else n_cls_miss++;
      if (!busy[tg] || !e_cls[tg] || cls_err || int'(cls_match) != e_match[tg]
          || int'(cls_action) != e_val[tg]) begin
        failures++;
        if (failures < 10) $display("cls tag %0d: match %0d/%0d action %h/%h err %0d",
                                    tg, cls_match, e_match[tg], cls_action, e_val[tg], cls_err);
      end
      busy[tg] = 0;
      n_busy--;
    end
  end

  task automatic issue(bit v6, logic [127:0] src, logic [127:0] dst, hdr_t h, bit c,
                       int ev, int em, int lat);
    int tg;
    tg = -1;
    while (tg < 0) begin
      for (int i = 0; i < 32; i++) if (tg < 0 && !busy[i]) tg = i;
      if (tg < 0) @(negedge clk);
    end
    busy[tg] = 1; n_busy++;
    e_cls[tg] = c; e_val[tg] = ev; e_match[tg] = em; e_lat[tg] = lat;
    req_valid = 1; req_tag = TAG_W'(tg); req_ipv6 = v6;
    req_src = v6 ? src : {96'b0, src[127:96]};
    req_dst = v6 ? dst : {96'b0, dst[127:96]};
    req_hdr = h;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t_in[tg] = cyc;
    #1 req_valid = 0;
  endtask

  function automatic logic [127:0] pick_fwd_key(bit v6);
    logic [127:0] r;
    int i;
    r = {$urandom, $urandom, $urandom, $urandom};
    if ($urandom_range(0, 5) != 0) begin
      i = $urandom_range(0, rt_key.size() - 1);
      while (rt_v6[i] != int'(v6)) i = $urandom_range(0, rt_key.size() - 1);
      r = (rt_key[i] & pmask(rt_len[i])) | (r & ~pmask(rt_len[i]));
    end
    return r;
  endfunction

  task automatic fwd_lookup(bit v6, bit exact);
    logic [127:0] key;
    int lvl, v, lat;
    int a;
    key = pick_fwd_key(v6);
    a = fwd_as(v6, key);
    v = fimg[a].walk(froot[a], key, lvl);
    if (v != lpm(v6, key)) begin
      failures++;
      $display("table builder disagrees with reference");
    end
    lat = exact ? 4*(lvl+1) + 1 : -1;
    if (lvl < 7) n_early++;
    if (lvl >= 16) n_deep++;
    issue(v6, '0, key, '0, 0, lpm(v6, key), 0, lat);
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while (n_busy > 0 && guard < 100000) begin
      @(negedge clk);
      guard++;
    end
  endtask

  // ---------------- classification tables ----------------
  // leaf pointer table entry {valid, rule index}; rule -1 = no rule
  function automatic int ptr_word(int rule);
    return (rule >= 0) ? (32'h8000 | rule) : 0;
  endfunction

  function automatic bit rule_hit(rule_t r, hdr_t h);
    if (!r.valid) return 0;
    if (((h.proto ^ r.proto) & r.proto_mask) != '0) return 0;
    if (h.sport < r.sport_lo || h.sport > r.sport_hi) return 0;
    if (h.dport < r.dport_lo || h.dport > r.dport_hi) return 0;
    if (((h.tos ^ r.tos) & r.tos_mask) != '0) return 0;
    if (((h.tos[7:2] ^ r.dscp) & r.dscp_mask) != '0) return 0;
    if (((h.flags ^ r.flags) & r.flags_mask) != '0) return 0;
    return 1;
  endfunction

  // most specific source prefix among the space's rules, then most specific
  // destination prefix among that source's rules: returns rule index or -1
  function automatic int rule_lookup(int as_id, logic [127:0] src, logic [127:0] dst);
    int bs, bd, ri;
    logic [127:0] ssel;
    bs = -1; ri = -1; ssel = '0;
    foreach (rules[i])
      if (rules[i].as_id == as_id && ((rules[i].src ^ src) & pmask(rules[i].slen)) == '0
          && rules[i].slen > bs) begin
        bs = rules[i].slen; ssel = rules[i].src;
      end
    if (bs < 0) return -1;
    bd = -1;
    foreach (rules[i])
      if (rules[i].as_id == as_id && rules[i].slen == bs && rules[i].src == ssel
          && ((rules[i].dst ^ dst) & pmask(rules[i].dlen)) == '0 && rules[i].dlen >= bd) begin
        bd = rules[i].dlen; ri = i;
      end
    return ri;
  endfunction

  task automatic add_rules(int as_id, bit v6, int n_src, int n_per_src, int proto);
    logic [127:0] base;
    base = {$urandom, $urandom, $urandom, $urandom};
    for (int s = 0; s < n_src; s++) begin
      logic [127:0] sk;
      int sl;
      sl = v6 ? $urandom_range(8, 48) : $urandom_range(4, 24);
      sk = ((base & pmask(sl/2)) | ({$urandom, $urandom, $urandom, $urandom} & ~pmask(sl/2))) & pmask(sl);
      for (int d = 0; d < n_per_src; d++) begin
        rule_rec_t rr;
        int a, b;
        rr.as_id = as_id;
        rr.src = sk; rr.slen = sl;
        rr.dlen = v6 ? $urandom_range(8, 48) : $urandom_range(4, 32);
        rr.dst = (d > 0 && $urandom_range(0, 1) == 0) ? rules[rules.size()-1].dst : {$urandom, $urandom, $urandom, $urandom};
        rr.dst = rr.dst & pmask(rr.dlen);
        rr.r.valid = 1;
        rr.r.proto = 8'(proto); rr.r.proto_mask = ($urandom_range(0, 2) == 0) ? 8'h00 : 8'hFF;
        a = $urandom_range(0, 65535); b = $urandom_range(0, 65535);
        rr.r.sport_lo = 16'(a < b ? a : b); rr.r.sport_hi = 16'(a < b ? b : a);
        a = $urandom_range(0, 5000);
        rr.r.dport_lo = 16'(a); rr.r.dport_hi = 16'(a + $urandom_range(0, 3000));
        rr.r.tos = 8'($urandom); rr.r.tos_mask = 8'($urandom) & 8'h03;
        rr.r.dscp = 6'($urandom); rr.r.dscp_mask = ($urandom_range(0, 1) == 0) ? 6'h00 : 6'h3F;
        rr.r.flags = 8'($urandom); rr.r.flags_mask = 8'($urandom) & 8'h12;
        rr.r.action = 8'($urandom_range(1, 200));
        rules.push_back(rr);
      end
    end
  endtask

  // array of tries for one classification space: rule records, trie images and the
  // leaf pointers of its destination leaves (leaf indices from leaf_base)
  task automatic build_cls(int as_id, bit v6, int bank, int leaf_base);
    trie_image t;
    int sroot, nsrc, dst_stage;
    int srcs [$];
    int src_of_leaf [int];
    int first_leaf [int];
    t = new();
    t.leafcnt = leaf_base;
    foreach (rules[i]) if (rules[i].as_id == as_id) cfg_wr(CFG_RULE, i, CFG_DW'(rules[i].r));
    // source trie over the distinct source prefixes; value = a rule with that source
    sroot = t.new_trie(-1);
    for (int len = 0; len <= 64; len++)
      foreach (rules[i])
        if (rules[i].as_id == as_id && rules[i].slen == len) t.insert(sroot, rules[i].src, len, i);
    void'(t.emit(sroot, 1, v6, 0, 0));
    nsrc = t.leafcnt - leaf_base;
    for (int l = leaf_base; l < t.leafcnt; l++) src_of_leaf[l] = t.leafval[l];
    dst_stage = v6 ? 2 : 1;
    t.alloc[dst_stage] = t.leafcnt;
    // one destination trie per source prefix; every source leaf gets a copy of its
    // root word at word <source leaf index>, the rest of the trie is shared
    for (int l = leaf_base; l < leaf_base + nsrc; l++) begin
      int droot, first, sr;
      sr = src_of_leaf[l];
      if (first_leaf.exists(sr)) begin
        t.img[dst_stage*65536 + l] = t.img[dst_stage*65536 + first_leaf[sr]];
        continue;
      end
      first_leaf[sr] = l;
      droot = t.new_trie(-1);
      if (sr >= 0)
        for (int len = 0; len <= 64; len++)
          foreach (rules[i])
            if (rules[i].as_id == as_id && rules[i].src == rules[sr].src
                && rules[i].slen == rules[sr].slen && rules[i].dlen == len)
              t.insert(droot, rules[i].dst, len, i);
      first = t.leafcnt;
      void'(t.emit(droot, 1, v6, 1, l));
      for (int k = first; k < t.leafcnt; k++)
        cfg_wr(CFG_RULE, 32'h800000 | k,
               CFG_DW'(ptr_word(t.leafval[k])));
    end
    load_image(t, bank);
  endtask

  task automatic cls_lookup(int as_id, bit v6, int proto);
    logic [127:0] s, d;
    hdr_t h;
    int ri, idx, em, ev;
    rule_t r;
    s = {$urandom, $urandom, $urandom, $urandom};
    d = {$urandom, $urandom, $urandom, $urandom};
    idx = $urandom_range(0, rules.size() - 1);
    while (rules[idx].as_id != as_id) idx = $urandom_range(0, rules.size() - 1);
    if ($urandom_range(0, 7) != 0) s = (rules[idx].src & pmask(rules[idx].slen)) | (s & ~pmask(rules[idx].slen));
    if ($urandom_range(0, 7) != 0) d = (rules[idx].dst & pmask(rules[idx].dlen)) | (d & ~pmask(rules[idx].dlen));
    r = rules[idx].r;
    h.proto = 8'(proto);
    h.sport = 16'($urandom_range(int'(r.sport_lo), int'(r.sport_hi)));
    h.dport = 16'($urandom_range(int'(r.dport_lo), int'(r.dport_hi)));
    h.tos   = {(r.dscp & r.dscp_mask) | (6'($urandom) & ~r.dscp_mask), 2'b00};
    h.tos   = h.tos | (r.tos & r.tos_mask & 8'h03) | (8'($urandom) & ~r.tos_mask & 8'h03);
    h.flags = (r.flags & r.flags_mask) | (8'($urandom) & ~r.flags_mask);
    if ($urandom_range(0, 4) == 0) h.dport = 16'($urandom);
    ri = rule_lookup(as_id, s, d);
    em = int'((ri >= 0) && rule_hit(rules[ri].r, h));
    ev = (em != 0) ? int'(rules[ri].r.action) : int'(DEF_ACT);
    // a destination-first space keeps its first-trie prefix in .src of the rule list:
    // that prefix is then matched against the packet's destination address
    if (dfirst_of[as_id]) begin
      issue(v6, d, s, h, 1, ev, em, -1);
      n_dfirst++;
    end else
      issue(v6, s, d, h, 1, ev, em, -1);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  initial begin
    foreach (busy[i]) busy[i] = 0;
    foreach (bank_of[i]) bank_of[i] = i;
    foreach (dfirst_of[i]) dfirst_of[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // address spaces: IPv4 0..2 split at octets 64 and 128; IPv6 3..4 split at 0x30
    cfg_wr(CFG_ASSEL, 32'h000, 64);
    cfg_wr(CFG_ASSEL, 32'h001, 128);
    cfg_wr(CFG_ASSEL, 32'h200, 3);
    cfg_wr(CFG_ASSEL, 32'h100, CFG_DW'(8'h30));
    cfg_wr(CFG_ASSEL, 32'h201, 2);
    cfg_wr(CFG_ASSEL, 32'h202, 3);
    // classification spaces: IPv4 TCP -> 5, IPv6 TCP -> 6, IPv4 UDP -> 7
    cfg_wr(CFG_ASSEL, 32'h406, 5);
    cfg_wr(CFG_ASSEL, 32'h506, 6);
    cfg_wr(CFG_ASSEL, 32'h411, 7);
    cfg_wr(CFG_RDEF, 0, CFG_DW'(DEF_ACT));

    add_routes(0, 150);
    add_routes(1, 120);
    for (int a = 0; a < 5; a++) build_fwd(a, a);

    // 1a: single lookups, exact latency
    for (int k = 0; k < 60; k++) begin
      fwd_lookup(1'(k % 2), 1);
      drain();
    end
    // 1b: random stream
    for (int k = 0; k < 1500; k++) fwd_lookup(1'($urandom_range(0, 1)), 0);
    drain();

    // 2: rebuild IPv4 space 1 with some routes withdrawn and new ones, load it into
    //    the spare bank 8 and swap it in; old bank 1 becomes the spare
    for (int i = 0; i < rt_key.size(); i++)
      if (!rt_v6[i] && fwd_as(0, rt_key[i]) == 1 && $urandom_range(0, 2) == 0) rt_alive[i] = 0;
    begin
      logic [127:0] k;
      for (int i = 0; i < 20; i++) begin
        int len;
        len = $urandom_range(8, 32);
        k = {2'b01, 30'($urandom), 96'b0} & pmask(len);
        rt_key.push_back(k); rt_len.push_back(len); rt_v6.push_back(0); rt_alive.push_back(1);
      end
    end
    build_fwd(1, 8);
    cfg_wr(CFG_ASSEL, 32'h301, 8);
    n_swap++;
    for (int k = 0; k < 600; k++) fwd_lookup(0, 0);
    drain();

    // 3: classification
    add_rules(5, 0, 12, 4, 6);
    add_rules(6, 1, 6, 3, 6);
    add_rules(7, 0, 8, 3, 17);
    build_cls(5, 0, 5, 0);
    build_cls(6, 1, 6, 8000);
    build_cls(7, 0, 7, 15000);
    dfirst_of[7] = 1;
    cfg_wr(CFG_ASSEL, 32'h203, 8'h80);     // space 7 is built destination-first
    cfg_wr(CFG_ENGINE, 0, 1);
    n_mode++;
    for (int k = 0; k < 1500; k++) begin
      case ($urandom_range(0, 2))
        0: cls_lookup(5, 0, 6);
        1: cls_lookup(6, 1, 6);
        default: cls_lookup(7, 0, 17);
      endcase
    end
    drain();

    // 4: back to forwarding, then a corrupt table in spare bank 1 for space 0:
    //    words 0-15 mark all 16 children internal and point back into
    //    words 0-15, so IPv4 walks run past level 7
    cfg_wr(CFG_ENGINE, 0, 0);
    n_mode++;
    for (int k = 0; k < 300; k++) fwd_lookup(1'($urandom_range(0, 1)), 0);
    drain();
    for (int w = 0; w < 16; w++) cfg_wr(CFG_MEM0, 1*WORDS_ST[0] + w, CFG_DW'({16'hFFFF, 16'd0, 22'd0}));
    cfg_wr(CFG_ASSEL, 32'h300, 1);
    n_swap++;
    for (int k = 0; k < 5; k++) issue(0, '0, {8'd5, 24'($urandom), 96'b0}, '0, 0, -2, 0, -1);
    drain();

    checks++;
    if (n_busy != 0) begin
      failures++;
      $display("%0d lookups never completed", n_busy);
    end
    $display("mechanisms: stall %0d hold %0d ho0-1 %0d ho0-2 %0d ho1-2 %0d ho2-3 %0d conflict %0d",
             n_stall, n_hold, n_ho01, n_ho02, n_ho12, n_ho23, n_resconf);
    $display("            fwd %0d early-exit %0d deep %0d cls-hit %0d cls-miss %0d swap %0d mode %0d err %0d",
             n_fwd, n_early, n_deep, n_cls_hit, n_cls_miss, n_swap, n_mode, n_err);
    $display("            destination-first %0d", n_dfirst);
    begin
      int m [16];
      m = '{n_stall, n_hold, n_ho01, n_ho02, n_ho12, n_ho23, n_resconf, n_fwd, n_early, n_deep,
            n_cls_hit, n_cls_miss, n_swap, n_mode, n_err, n_dfirst};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
