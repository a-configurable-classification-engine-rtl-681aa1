// Workload test of cls_engine at its default sizes: the rates, latencies and rule-set
// sizes the engine is specified for.
//
//   A. IPv4 forwarding: 3000 routes, 2000 of them /32 host routes. A stream of 1024
//      lookups of /32 keys (every walk reaches trie level 7) must run at no more than
//      17 cycles per lookup (28 million lookups per second at a 2 ns clock); single
//      lookups must take the full-depth 32 cycles of trie walk (+1 output register).
//   B. IPv6 forwarding with /64 routes: single lookups must take 64 cycles of walk
//      (+1) across stages 0 and 1; a stream is measured as in A.
//   C. Diffserv: 20000 rules (10000 IPv4 TCP, 10000 IPv4 UDP, each protocol in its own
//      address space), 100 source prefixes per protocol with 100 destination prefixes
//      each. The array of tries must fit the stage memories of one address space and
//      the leaf pointer table; 1500 classification lookups are checked.
//   D. Firewall: 10000 rules in one address space shared by TCP and UDP, loaded into
//      the spare bank; 1000 classification lookups are checked.
// Tables are built by trie_image_pkg; expected results come from direct longest-
// prefix / rule matching over the rule lists. The trie sizes built are printed.
// Only the engine's ports are used.
module cls_workload_tb;
  import cls_pkg::*;
  import trie_image_pkg::*;

  localparam int WORDS_ST [4] = '{65536, 40960, 20480, 20480};   // defaults of cls_engine
  localparam int RULES  = 20000;
  localparam int LEAVES = 737280;
  localparam logic [7:0] DEF_ACT = 8'h5A;
  localparam int MAX_CYC_PER_LOOKUP = 17;   // 500 MHz / 28 M lookups/s = 17.9

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

  function automatic logic [127:0] pmask(int len);
    return (len == 0) ? '0 : ~((128'd1 << (128 - len)) - 128'd1);
  endfunction

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- configuration bus: one write per cycle ----------------
  task automatic cfg_put(cfg_sel_e sel, int addr, logic [CFG_DW-1:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.sel = sel; cfg.addr = CFG_AW'(addr); cfg.wdata = data;
  endtask

  task automatic cfg_end();
    @(negedge clk);
    cfg.we = 0;
  endtask

  task automatic load_image(trie_image t, int bank);
    foreach (t.img[k]) begin
      int st, w;
      st = k / 65536;
      w  = k % 65536;
      cfg_put(cfg_sel_e'(int'(CFG_MEM0) + st), bank*WORDS_ST[st] + w, CFG_DW'(t.img[k]));
    end
    cfg_end();
  endtask

  // ---------------- routes and next-hop DRAM model ----------------
  logic [127:0] rt_key [$];
  int rt_len [$];
  int dram [int];               // bank*2^22 + leaf -> next hop (route index + 1)

  function automatic int lpm(logic [127:0] key);
    int best, v;
    best = -1; v = 0;
    foreach (rt_key[i])
      if (((rt_key[i] ^ key) & pmask(rt_len[i])) == '0 && rt_len[i] >= best) begin
        best = rt_len[i];
        v = i + 1;
      end
    return v;
  endfunction

  task automatic build_fwd(bit v6, int bank);
    trie_image t;
    int root;
    t = new();
    root = t.new_trie(0);
    for (int len = 0; len <= 128; len++)
      foreach (rt_key[i]) if (rt_len[i] == len) t.insert(root, rt_key[i], len, i + 1);
    void'(t.emit(root, 0, v6, 0, 0));
    foreach (t.leafval[l]) dram[bank*(2**LEAF_W) + l] = t.leafval[l];
    $display("forwarding table (%s): %0d routes, %0d trie words (%0d KB), %0d leaves",
             v6 ? "IPv6" : "IPv4", rt_key.size(), t.img.size(), t.img.size()*2/1024, t.leafcnt);
    for (int s = 0; s < 4; s++) check(t.alloc[s] <= WORDS_ST[s], "forwarding trie exceeds a stage partition");
    load_image(t, bank);
  endtask

  // ---------------- request / response bookkeeping ----------------
  bit busy [32];
  bit e_cls [32];
  int e_val [32], e_match [32], e_lat [32], t_in [32];
  int n_busy = 0, n_done = 0, last_out = 0, n_hit = 0;

  always @(posedge clk) if (rst_n) begin
    if (fwd_valid) begin
      int tg, v;
      tg = int'(fwd_tag);
      v = dram.exists(int'(fwd_dram_addr)) ? dram[int'(fwd_dram_addr)] : -7;
      checks++;
      if (!busy[tg] || e_cls[tg] || fwd_err || v != e_val[tg]
          || (e_lat[tg] >= 0 && cyc - t_in[tg] != e_lat[tg])) begin
        failures++;
        if (failures < 10) $display("fwd tag %0d: err %0d nh %0d/%0d lat %0d/%0d",
                                    tg, fwd_err, v, e_val[tg], cyc - t_in[tg], e_lat[tg]);
      end
      busy[tg] = 0; n_busy--; n_done++; last_out = cyc;
    end
    if (cls_valid) begin
      int tg;
      tg = int'(cls_tag);
      checks++;
      if (cls_match) n_hit++;
      if (!busy[tg] || !e_cls[tg] || cls_err || int'(cls_match) != e_match[tg]
          || int'(cls_action) != e_val[tg]) begin
        failures++;
        if (failures < 10) $display("cls tag %0d: match %0d/%0d action %h/%h err %0d",
                                    tg, cls_match, e_match[tg], cls_action, e_val[tg], cls_err);
      end
      busy[tg] = 0; n_busy--; n_done++; last_out = cyc;
    end
  end

  // Issue one request on the next free tag. Back-to-back calls keep req_valid high.
  task automatic issue(bit v6, logic [127:0] src, logic [127:0] dst, hdr_t h, bit c,
                       int ev, int em, int lat);
    int tg;
    tg = -1;
    while (tg < 0) begin
      for (int i = 0; i < 32; i++) if (tg < 0 && !busy[i]) tg = i;
      if (tg < 0) begin
        req_valid = 0;
        @(negedge clk);
      end
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
    #1;
  endtask

  task automatic drain();
    int guard;
    req_valid = 0;
    guard = 0;
    while (n_busy > 0 && guard < 200000) begin
      @(negedge clk);
      guard++;
    end
    check(n_busy == 0, "lookups left in flight");
  endtask

  // forwarding key matching route i exactly over its length
  function automatic logic [127:0] key_of(int i);
    return (rt_key[i] & pmask(rt_len[i])) | (rnd128() & ~pmask(rt_len[i]));
  endfunction

  // single lookups with exact latency, then a stream whose rate is measured
  task automatic fwd_workload(bit v6, int first_full, int n_full, int exp_lat, string name);
    int t0, n0, cycles;
    real rate;
    for (int k = 0; k < 40; k++) begin
      logic [127:0] key;
      key = key_of(first_full + $urandom_range(0, n_full - 1));
      issue(v6, '0, key, '0, 0, lpm(key), 0, exp_lat);
      req_valid = 0;
      drain();
    end
    n0 = n_done;
    t0 = cyc;
    for (int k = 0; k < 1024; k++) begin
      logic [127:0] key;
      key = key_of(first_full + $urandom_range(0, n_full - 1));
      issue(v6, '0, key, '0, 0, lpm(key), 0, -1);
    end
    drain();
    cycles = last_out - t0;
    rate = real'(cycles) / real'(n_done - n0);
    $display("%s: %0d lookups in %0d cycles, %0.2f cycles per lookup, %0.1f M lookups/s at 2 ns",
             name, n_done - n0, cycles, rate, 500.0 / rate);
    check(n_done - n0 == 1024, "stream lost lookups");
    check(rate <= real'(MAX_CYC_PER_LOOKUP), "throughput below 28 M lookups/s at 2 ns");
  endtask

  // ---------------- rules ----------------
  // rule i belongs to source group grp_of[i]; groups are contiguous ranges of rules
  typedef struct {
    logic [127:0] dst; int dlen;
    rule_t r;
  } rule_rec_t;
  rule_rec_t rules [$];
  logic [127:0] g_src [$];
  int g_len [$], g_first [$], g_n [$], g_space [$];

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

  // most specific source group of the space, then its most specific destination
  function automatic int rule_lookup(int space, logic [127:0] src, logic [127:0] dst);
    int bs, g, bd, ri;
    bs = -1; g = -1; ri = -1; bd = -1;
    foreach (g_src[i])
      if (g_space[i] == space && ((g_src[i] ^ src) & pmask(g_len[i])) == '0 && g_len[i] > bs) begin
        bs = g_len[i]; g = i;
      end
    if (g < 0) return -1;
    for (int i = g_first[g]; i < g_first[g] + g_n[g]; i++)
      if (((rules[i].dst ^ dst) & pmask(rules[i].dlen)) == '0 && rules[i].dlen >= bd) begin
        bd = rules[i].dlen; ri = i;
      end
    return ri;
  endfunction

  function automatic int pick_dlen();
    int p;
    p = $urandom_range(0, 99);
    if (p < 5)  return 16;
    if (p < 20) return 20;
    if (p < 80) return 24;
    if (p < 90) return 28;
    return 32;
  endfunction

  // n_src distinct source prefixes inside one /8, each with n_dst destination
  // prefixes inside its own /16
  task automatic add_rules(int space, int n_src, int n_dst, int proto_a, int proto_b);
    logic [127:0] sbase;
    sbase = rnd128();
    for (int s = 0; s < n_src; s++) begin
      logic [127:0] sk, dbase;
      int sl;
      bit dup;
      dup = 1;
      while (dup) begin
        sl = $urandom_range(12, 24);
        sk = ((sbase & pmask(8)) | (rnd128() & ~pmask(8))) & pmask(sl);
        dup = 0;
        foreach (g_src[i]) if (g_space[i] == space && g_src[i] == sk && g_len[i] == sl) dup = 1;
      end
      g_src.push_back(sk); g_len.push_back(sl); g_first.push_back(rules.size());
      g_n.push_back(n_dst); g_space.push_back(space);
      dbase = rnd128();
      for (int d = 0; d < n_dst; d++) begin
        rule_rec_t rr;
        int a, b;
        rr.dlen = pick_dlen();
        rr.dst = ((dbase & pmask(16)) | (rnd128() & ~pmask(16))) & pmask(rr.dlen);
        rr.r.valid = 1;
        rr.r.proto = 8'(($urandom_range(0, 1) == 0) ? proto_a : proto_b);
        rr.r.proto_mask = ($urandom_range(0, 2) == 0) ? 8'h00 : 8'hFF;
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

  // Array of tries of one IPv4 classification space into a bank. Source leaves are
  // numbered from 0 (they name the destination roots), destination leaves from
  // ptr_base (they index the leaf pointer table). Returns the next free pointer.
  task automatic build_cls(int space, int bank, int ptr_base, output int ptr_next);
    trie_image t;
    int sroot, nsrc, nwords;
    int first_leaf [int];
    int src_of_leaf [int];
    t = new();
    foreach (rules[i])
      if (g_space[rule_grp(i)] == space) cfg_put(CFG_RULE, i, CFG_DW'(rules[i].r));
    sroot = t.new_trie(-1);
    for (int len = 0; len <= 32; len++)
      foreach (g_src[g]) if (g_space[g] == space && g_len[g] == len) t.insert(sroot, g_src[g], len, g);
    void'(t.emit(sroot, 1, 0, 0, 0));
    nsrc = t.leafcnt;
    for (int l = 0; l < nsrc; l++) src_of_leaf[l] = t.leafval[l];
    t.alloc[1] = nsrc;
    t.leafcnt = ptr_base;
    for (int l = 0; l < nsrc; l++) begin
      int droot, first, g;
      g = src_of_leaf[l];
      if (first_leaf.exists(g)) begin
        t.img[65536 + l] = t.img[65536 + first_leaf[g]];
        continue;
      end
      first_leaf[g] = l;
      droot = t.new_trie(-1);
      if (g >= 0)
        for (int len = 0; len <= 32; len++)
          for (int i = g_first[g]; i < g_first[g] + g_n[g]; i++)
            if (rules[i].dlen == len) t.insert(droot, rules[i].dst, len, i);
      first = t.leafcnt;
      void'(t.emit(droot, 1, 0, 1, l));
      for (int k = first; k < t.leafcnt; k++)
        cfg_put(CFG_RULE, 32'h800000 | k,
                CFG_DW'(ptr_word(t.leafval[k])));
    end
    cfg_end();
    nwords = t.img.size();
    $display("space %0d: %0d source leaves, stage words %0d/%0d, %0d topology words (%0d KB), pointers %0d..%0d",
             space, nsrc, t.alloc[0], t.alloc[1], nwords, nwords*2/1024, ptr_base, t.leafcnt - 1);
    check(t.alloc[0] <= WORDS_ST[0] && t.alloc[1] <= WORDS_ST[1], "rule tries exceed a stage partition");
    check(t.leafcnt <= LEAVES, "destination leaves exceed the leaf pointer table");
    ptr_next = t.leafcnt;
    load_image(t, bank);
  endtask

  function automatic int rule_grp(int i);
    foreach (g_first[g]) if (i >= g_first[g] && i < g_first[g] + g_n[g]) return g;
    return -1;
  endfunction

  task automatic cls_lookup(int space, int proto);
    logic [127:0] s, d;
    hdr_t h;
    int ri, idx, g, em, ev;
    rule_t r;
    g = $urandom_range(0, g_src.size() - 1);
    while (g_space[g] != space) g = $urandom_range(0, g_src.size() - 1);
    idx = g_first[g] + $urandom_range(0, g_n[g] - 1);
    s = rnd128();
    d = rnd128();
    if ($urandom_range(0, 7) != 0) s = (g_src[g] & pmask(g_len[g])) | (s & ~pmask(g_len[g]));
    if ($urandom_range(0, 7) != 0) d = (rules[idx].dst & pmask(rules[idx].dlen)) | (d & ~pmask(rules[idx].dlen));
    r = rules[idx].r;
    h.proto = 8'(proto);
    h.sport = 16'($urandom_range(int'(r.sport_lo), int'(r.sport_hi)));
    h.dport = 16'($urandom_range(int'(r.dport_lo), int'(r.dport_hi)));
    h.tos   = {(r.dscp & r.dscp_mask) | (6'($urandom) & ~r.dscp_mask), 2'b00};
    h.tos   = h.tos | (r.tos & r.tos_mask & 8'h03) | (8'($urandom) & ~r.tos_mask & 8'h03);
    h.flags = (r.flags & r.flags_mask) | (8'($urandom) & ~r.flags_mask);
    if ($urandom_range(0, 4) == 0) h.dport = 16'($urandom);
    ri = rule_lookup(space, s, d);
    em = int'((ri >= 0) && rule_hit(rules[ri].r, h));
    ev = (em != 0) ? int'(rules[ri].r.action) : int'(DEF_ACT);
    issue(0, s, d, h, 1, ev, em, -1);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  initial begin
    int pn;
    foreach (busy[i]) busy[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // A. IPv4 forwarding, full depth: space 0 in bank 0
    for (int i = 0; i < 1000; i++) begin
      int len;
      len = $urandom_range(8, 31);
      rt_key.push_back(rnd128() & pmask(len)); rt_len.push_back(len);
    end
    begin
      logic [127:0] b16 [16];
      foreach (b16[i]) b16[i] = rnd128();
      for (int i = 0; i < 2000; i++) begin
        rt_key.push_back(((b16[i % 16] & pmask(16)) | (rnd128() & ~pmask(16))) & pmask(32));
        rt_len.push_back(32);
      end
    end
    build_fwd(0, 0);
    fwd_workload(0, 1000, 2000, 4*8 + 1, "IPv4 /32 forwarding");

    // B. IPv6 forwarding with /64 routes: space 1 in bank 1
    rt_key.delete(); rt_len.delete();
    cfg_put(CFG_ASSEL, 32'h201, 1);        // one IPv6 range ...
    cfg_put(CFG_ASSEL, 32'h202, 1);        // ... in space 1
    cfg_end();
    begin
      logic [127:0] b32 [8];
      foreach (b32[i]) b32[i] = rnd128();
      for (int i = 0; i < 50; i++) begin
        rt_key.push_back(((b32[i % 8] & pmask(32)) | (rnd128() & ~pmask(32))) & pmask(48));
        rt_len.push_back(48);
      end
      for (int i = 0; i < 1000; i++) begin
        rt_key.push_back(((b32[i % 8] & pmask(32)) | (rnd128() & ~pmask(32))) & pmask(64));
        rt_len.push_back(64);
      end
    end
    build_fwd(1, 1);
    fwd_workload(1, 50, 1000, 4*16 + 1, "IPv6 /64 forwarding");

    // C. Diffserv: 20000 rules, TCP in space 2 (bank 2), UDP in space 3 (bank 3)
    cfg_put(CFG_ASSEL, 32'h406, 2);
    cfg_put(CFG_ASSEL, 32'h411, 3);
    cfg_put(CFG_RDEF, 0, CFG_DW'(DEF_ACT));
    cfg_put(CFG_ENGINE, 0, 1);
    cfg_end();
    add_rules(2, 100, 100, 6, 6);
    add_rules(3, 100, 100, 17, 17);
    check(rules.size() == 20000, "diffserv rule count");
    build_cls(2, 2, 0, pn);
    build_cls(3, 3, pn, pn);
    n_hit = 0;
    for (int k = 0; k < 1500; k++) begin
      if (k % 2 == 0) cls_lookup(2, 6);
      else            cls_lookup(3, 17);
    end
    drain();
    $display("diffserv: %0d rule hits of 1500", n_hit);
    check(n_hit > 300, "diffserv lookups rarely hit a rule");

    // D. Firewall: 10000 rules for TCP and UDP in space 4, loaded into the spare bank
    rules.delete(); g_src.delete(); g_len.delete(); g_first.delete(); g_n.delete(); g_space.delete();
    add_rules(4, 100, 100, 6, 17);
    check(rules.size() == 10000, "firewall rule count");
    build_cls(4, 8, 0, pn);
    cfg_put(CFG_ASSEL, 32'h406, 4);
    cfg_put(CFG_ASSEL, 32'h411, 4);
    cfg_put(CFG_ASSEL, 32'h304, 8);        // space 4 -> spare bank 8
    cfg_end();
    n_hit = 0;
    for (int k = 0; k < 1000; k++) cls_lookup(4, (k % 2 == 0) ? 6 : 17);
    drain();
    $display("firewall: %0d rule hits of 1000", n_hit);
    check(n_hit > 200, "firewall lookups rarely hit a rule");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
