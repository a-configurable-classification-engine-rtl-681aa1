// Self-checking test of lookup_stage (stage 0) at a reduced memory size.
// Builds an IPv4 forwarding trie in bank 1 and an IPv6 one in bank 0 from random
// clustered prefixes, loads the stage-0 words through the write port and sends
// lookups. Expected results come from a longest-prefix match over the prefix list:
// IPv4 lookups and short IPv6 ones must complete with a leaf that holds the matching
// prefix's value; IPv6 lookups that go past level 7 must be handed to stage 1 at
// level 8 with the word of the node reached. Phase 1 sends one lookup at a time and
// checks the latency of 4 cycles per level; phase 2 streams lookups with random
// back-pressure on both output ports, so contexts must wait in the ring and new
// lookups must be held off.
module lookup_stage_tb;
  import cls_pkg::*;
  import trie_image_pkg::*;

  localparam int NB = 2, W = 512;
  localparam int MAW = $clog2(NB*W);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  ctx_t in_ctx = '0;
  logic ho_valid, ho_ready = 1;
  ctx_t ho_ctx;
  logic [1:0] ho_tgt;
  logic res_valid, res_ready = 1;
  result_t res;
  logic mem_wr_en = 0;
  logic [MAW-1:0] mem_wr_addr = '0;
  trie_word_t mem_wr_data = '0;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_hold = 0, n_stall = 0, n_ho = 0, n_res = 0;

  trie_image t4, t6;
  int r4, r6;
  logic [127:0] p4_key [$], p6_key [$];
  int p4_len [$], p6_len [$];

  // expectations per tag
  bit   e_ho  [32];
  int   e_val [32];
  int   e_lvl [32];
  int   e_wrd [32];
  int   t_in  [32];
  bit   busy  [32];
  bit   exact_lat;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  lookup_stage #(.STAGE(2'd0), .NBANK(NB), .WORDS(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_ctx(in_ctx),
    .ho_valid(ho_valid), .ho_ready(ho_ready), .ho_ctx(ho_ctx), .ho_tgt(ho_tgt),
    .res_valid(res_valid), .res_ready(res_ready), .res(res),
    .mem_wr_en(mem_wr_en), .mem_wr_addr(mem_wr_addr), .mem_wr_data(mem_wr_data));

  function automatic int lpm(bit v6, logic [127:0] key);
    int best, v, n;
    best = -1;
    v    = 0;
    n    = v6 ? p6_key.size() : p4_key.size();
    for (int i = 0; i < n; i++) begin
      logic [127:0] pk, m;
      int len;
      pk  = v6 ? p6_key[i] : p4_key[i];
      len = v6 ? p6_len[i] : p4_len[i];
      m   = (len == 0) ? '0 : ~((128'd1 << (128 - len)) - 128'd1);
      if (((pk ^ key) & m) == '0 && len >= best) begin
        best = len;
        v = i + 1;
      end
    end
    return v;
  endfunction

  task automatic make_prefixes(bit v6, int n);
    logic [127:0] bases [4];
    for (int b = 0; b < 4; b++) bases[b] = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < n; i++) begin
      int len, keep;
      logic [127:0] k, r, m;
      len  = v6 ? $urandom_range(8, 60) : $urandom_range(4, 32);
      k    = bases[$urandom_range(0, 3)];
      r    = {$urandom, $urandom, $urandom, $urandom};
      keep = $urandom_range(len/2, len);
      m    = ~((128'd1 << (128 - keep)) - 128'd1);
      k = (k & m) | (r & ~m);
      k = k & ~((128'd1 << (128 - len)) - 128'd1);
      if (v6) begin p6_key.push_back(k); p6_len.push_back(len); end
      else    begin p4_key.push_back(k); p4_len.push_back(len); end
    end
  endtask

  // insert in order of increasing length
  task automatic build(trie_image t, int root, bit v6);
    int n;
    n = v6 ? p6_key.size() : p4_key.size();
    for (int len = 0; len <= 64; len++)
      for (int i = 0; i < n; i++)
        if ((v6 ? p6_len[i] : p4_len[i]) == len)
          t.insert(root, v6 ? p6_key[i] : p4_key[i], len, i + 1);
  endtask

  task automatic load(trie_image t, int bank);
    foreach (t.img[k]) begin
      if (k < 65536) begin
        @(negedge clk);
        mem_wr_en = 1; mem_wr_addr = MAW'(bank*W + k); mem_wr_data = t.img[k];
      end
    end
    @(negedge clk) mem_wr_en = 0;
  endtask

  function automatic logic [127:0] pick_key(bit v6);
    logic [127:0] r;
    r = {$urandom, $urandom, $urandom, $urandom};
    if ($urandom_range(0, 4) != 0) begin
      int i, len;
      logic [127:0] m;
      i   = v6 ? $urandom_range(0, p6_key.size()-1) : $urandom_range(0, p4_key.size()-1);
      len = v6 ? p6_len[i] : p4_len[i];
      m   = (len == 0) ? '0 : ~((128'd1 << (128 - len)) - 128'd1);
      r = ((v6 ? p6_key[i] : p4_key[i]) & m) | (r & ~m);
    end
    return r;
  endfunction

  task automatic send(int tag, bit v6);
    logic [127:0] key;
    int lvl, v, root;
    trie_image t;
    key  = pick_key(v6);
    t    = v6 ? t6 : t4;
    root = v6 ? r6 : r4;
    v = t.walk(root, key, lvl);
    e_val[tag] = lpm(v6, key);
    e_lvl[tag] = lvl;
    e_ho[tag]  = (lvl >= 8);
    e_wrd[tag] = e_ho[tag] ? t.wordof[t.node_at(root, key, 8)] : 0;
    busy[tag]  = 1;
    in_ctx      = '0;
    in_ctx.tag  = TAG_W'(tag);
    in_ctx.ipv6 = v6;
    in_ctx.bank = v6 ? 4'd0 : 4'd1;
    in_ctx.dst  = v6 ? key : {96'b0, key[127:96]};
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) begin
      n_stall++;
      @(posedge clk);
    end
    t_in[tag] = cyc;
    #1 in_valid = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n && res_valid && !res_ready) n_hold++;
    if (rst_n && ho_valid && !ho_ready) n_hold++;
    if (rst_n && res_valid && res_ready) begin
      int tg;
      trie_image t;
      tg = int'(res.tag);
      t  = (res.bank == 4'd0) ? t6 : t4;
      n_res++;
      checks++;
      if (!busy[tg] || e_ho[tg] || res.kind != RES_FWD || t.leafval[int'(res.leaf)] != e_val[tg]
          || (exact_lat && cyc - t_in[tg] != 4*(e_lvl[tg]+1))) begin
        failures++;
        if (failures < 8) $display("res tag %0d: leaf %0d val %0d exp %0d lat %0d lvl %0d",
                                   tg, res.leaf, t.leafval[int'(res.leaf)], e_val[tg],
                                   cyc - t_in[tg], e_lvl[tg]);
      end
      busy[tg] = 0;
    end
    if (rst_n && ho_valid && ho_ready) begin
      int tg;
      tg = int'(ho_ctx.tag);
      n_ho++;
      checks++;
      if (!busy[tg] || !e_ho[tg] || ho_tgt != 2'd1 || ho_ctx.level != 5'd8
          || int'(ho_ctx.word) != e_wrd[tg] || (exact_lat && cyc - t_in[tg] != 32)) begin
        failures++;
        if (failures < 8) $display("ho tag %0d: word %0d exp %0d lvl %0d", tg, ho_ctx.word,
                                   e_wrd[tg], ho_ctx.level);
      end
      busy[tg] = 0;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (busy[i]) busy[i] = 0;
    t4 = new(); t6 = new();
    make_prefixes(0, 40);
    make_prefixes(1, 30);
    r4 = t4.new_trie(0);
    r6 = t6.new_trie(0);
    build(t4, r4, 0);
    build(t6, r6, 1);
    void'(t4.emit(r4, 0, 0, 0, 0));
    void'(t6.emit(r6, 0, 1, 0, 0));
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(t4, 1);
    load(t6, 0);
    // phase 1: one at a time, exact latency
    exact_lat = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      send(k % 32, 1'($urandom_range(0, 1)));
      while (busy[k % 32]) @(negedge clk);
    end
    // phase 2: streaming with back-pressure
    exact_lat = 0;
    fork
      begin
        for (int k = 0; k < 2000; k++) begin
          @(negedge clk);
          while (busy[k % 32]) @(negedge clk);
          send(k % 32, 1'($urandom_range(0, 1)));
        end
      end
      begin
        for (int k = 0; k < 20000; k++) begin
          @(negedge clk);
          res_ready = ($urandom_range(0, 2) != 0);
          ho_ready  = ($urandom_range(0, 2) != 0);
        end
      end
    join_any
    res_ready = 1; ho_ready = 1;
    repeat (200) @(negedge clk);
    checks++;
    foreach (busy[i]) if (busy[i]) begin failures++; break; end
    checks++;
    if (n_hold == 0 || n_stall == 0 || n_ho < 50 || n_res < 50) begin
      failures++;
      $display("coverage: hold %0d stall %0d ho %0d res %0d", n_hold, n_stall, n_ho, n_res);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
