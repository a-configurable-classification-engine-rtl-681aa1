// Self-checking test of rule_cmp at 48 records and 100 leaf pointers: random rules with
// ranges and masks, a random leaf -> rule pointer table (some pointers invalid, some
// naming a record beyond the memory), headers either drawn to satisfy the rule a leaf
// points to (then one field possibly disturbed) or random; the expected action is
// worked out field by field in the testbench. Also checks the three-cycle latency,
// the default action, leaves beyond the table and error pass-through.
module rule_cmp_tb;
  import cls_pkg::*;

  localparam int R = 48;
  localparam int L = 100;
  logic clk = 0, rst_n = 0;
  cfg_t cfg = '0;
  logic in_valid = 0, in_err = 0;
  logic [TAG_W-1:0] in_tag = '0;
  logic [LEAF_W-1:0] in_leaf = '0;
  logic hdr_rd_en;
  logic [TAG_W-1:0] hdr_rd_tag;
  hdr_t hdr_rd;
  logic out_valid, out_err, out_match;
  logic [TAG_W-1:0] out_tag;
  logic [7:0] out_action;
  rule_t rules [R];
  int    pvalid [L], pidx [L];
  hdr_t  hdrs [2**TAG_W];
  int checks = 0, failures = 0, hits = 0;
  int cyc = 0;
  // expectations queued by issue cycle
  int q_cyc [$], q_tag [$], q_match [$], q_act [$], q_err [$];
  localparam logic [7:0] DEF = 8'hD7;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // header buffer model
  always @(posedge clk) if (hdr_rd_en) hdr_rd <= hdrs[hdr_rd_tag];

  rule_cmp #(.RULES(R), .LEAVES(L)) dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .in_valid(in_valid),
    .in_tag(in_tag), .in_err(in_err), .in_leaf(in_leaf), .hdr_rd_en(hdr_rd_en),
    .hdr_rd_tag(hdr_rd_tag), .hdr_rd(hdr_rd), .out_valid(out_valid), .out_tag(out_tag),
    .out_err(out_err), .out_match(out_match), .out_action(out_action));

  function automatic bit rule_hit(rule_t r, hdr_t h);
    if (!r.valid) return 0;
    for (int i = 0; i < 8; i++) if (r.proto_mask[i] && r.proto[i] != h.proto[i]) return 0;
    if (h.sport < r.sport_lo || h.sport > r.sport_hi) return 0;
    if (h.dport < r.dport_lo || h.dport > r.dport_hi) return 0;
    for (int i = 0; i < 8; i++) if (r.tos_mask[i] && r.tos[i] != h.tos[i]) return 0;
    for (int i = 0; i < 6; i++) if (r.dscp_mask[i] && r.dscp[i] != h.tos[i+2]) return 0;
    for (int i = 0; i < 8; i++) if (r.flags_mask[i] && r.flags[i] != h.flags[i]) return 0;
    return 1;
  endfunction

  task automatic wr(cfg_sel_e sel, int addr, logic [CFG_DW-1:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.sel = sel; cfg.addr = CFG_AW'(addr); cfg.wdata = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q_cyc.size() == 0) failures++;
      else begin
        int c, t, m, a, e;
        c = q_cyc.pop_front(); t = q_tag.pop_front(); m = q_match.pop_front();
        a = q_act.pop_front(); e = q_err.pop_front();
        if (cyc - c != 3 || int'(out_tag) != t || int'(out_match) != m
            || int'(out_action) != a || int'(out_err) != e) begin
          failures++;
          if (failures < 6) $display("tag %0d: lat %0d match %0d/%0d act %h/%h err %0d/%0d",
                                     out_tag, cyc - c, out_match, m, out_action, a, out_err, e);
        end
        if (m) hits++;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < R; i++) begin
      rule_t r;
      int a, b;
      r.valid = ($urandom_range(0, 7) != 0);
      r.proto = 8'($urandom_range(0, 20)); r.proto_mask = ($urandom_range(0, 3) == 0) ? 8'h00 : 8'hFF;
      a = $urandom_range(0, 65535); b = $urandom_range(0, 65535);
      r.sport_lo = 16'(a < b ? a : b); r.sport_hi = 16'(a < b ? b : a);
      a = $urandom_range(0, 2000); b = $urandom_range(0, 65535);
      r.dport_lo = 16'(a); r.dport_hi = 16'(a + (b % 3000));
      r.tos = 8'($urandom); r.tos_mask = 8'($urandom) & 8'h03;
      r.dscp = 6'($urandom); r.dscp_mask = ($urandom_range(0, 1) == 0) ? 6'h00 : 6'h3F;
      r.flags = 8'($urandom); r.flags_mask = 8'($urandom) & 8'h12;
      r.action = 8'(i + 1);
      rules[i] = r;
      wr(CFG_RULE, i, CFG_DW'(r));
    end
    for (int l = 0; l < L; l++) begin
      pvalid[l] = ($urandom_range(0, 9) != 0);
      pidx[l]   = $urandom_range(0, 63);          // 48..63 lie beyond the rule memory
      if ($urandom_range(0, 3) != 0) pidx[l] = pidx[l] % R;
      wr(CFG_RULE, 32'h800000 | l, CFG_DW'({pvalid[l][0], 6'(pidx[l])}));
    end
    wr(CFG_RDEF, 0, CFG_DW'(DEF));
    for (int k = 0; k < 2000; k++) begin
      int idx, tg;
      hdr_t h;
      rule_t r;
      bit err;
      idx = $urandom_range(0, L + 3);             // a few leaves beyond the table
      tg  = $urandom_range(0, 2**TAG_W - 1);
      r   = rules[pidx[idx % L] % R];
      h.proto = ($urandom_range(0, 3) == 0) ? 8'($urandom) : r.proto;
      h.sport = 16'($urandom_range(int'(r.sport_lo), int'(r.sport_hi)));
      h.dport = 16'($urandom_range(int'(r.dport_lo), int'(r.dport_hi)));
      h.tos   = {(r.dscp & r.dscp_mask) | (6'($urandom) & ~r.dscp_mask), 2'b00};
      h.tos   = h.tos | (r.tos & r.tos_mask & 8'h03) | (8'($urandom) & ~r.tos_mask & 8'h03);
      h.flags = (r.flags & r.flags_mask) | (8'($urandom) & ~r.flags_mask);
      case ($urandom_range(0, 5))
        0: h.sport = 16'($urandom);
        1: h.dport = 16'($urandom);
        2: h.flags = 8'($urandom);
        default: ;
      endcase
      err = ($urandom_range(0, 30) == 0);
      @(negedge clk);
      hdrs[tg] = h;
      in_valid = 1; in_tag = TAG_W'(tg); in_leaf = LEAF_W'(idx); in_err = err;
      begin
        bit m;
        m = !err && idx < L && pvalid[idx % L] != 0 && pidx[idx % L] < R
            && rule_hit(rules[pidx[idx % L] % R], h);
        q_cyc.push_back(cyc); q_tag.push_back(tg); q_match.push_back(m);
        q_act.push_back(m ? int'(rules[pidx[idx % L] % R].action) : int'(DEF)); q_err.push_back(err);
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (q_cyc.size() != 0 || hits < 200) begin
      failures++;
      $display("left %0d hits %0d", q_cyc.size(), hits);
    end
    $display("hits=%0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
