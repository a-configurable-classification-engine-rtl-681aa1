// Rule memory and field comparator of the firewall / diffserv engine.
//
// The leaf reached in a destination trie selects an entry of the leaf pointer table,
// which names a record in the rule memory (many leaves of a leaf-pushed trie share one
// rule, so records are not stored per leaf). A record holds the remaining fields of a
// rule: protocol (value and mask), source and destination port ranges, ToS (value and
// mask), DSCP (value and mask, compared with ToS[7:2]) and TCP flags (value and mask),
// plus the action to apply. The packet's own fields come from the header buffer. A
// direct comparison of all fields gives the rule's action; a miss, an invalid pointer
// or record, an index outside either memory or a failed trie walk (err) gives the
// software-set default action.
//
// Timing: a lookup accepted in cycle t reads the pointer table (data in t+1); in t+1
// it reads the rule memory and the header buffer (hdr_rd_* issued combinationally in
// t+1, data in t+2); the result is registered and appears at out_* in cycle t+3. It
// accepts one lookup per cycle and never back-pressures.
// Configuration (sel CFG_RULE): addr[23]=0 writes rule record addr[22:0]; addr[23]=1
// writes leaf pointer addr[22:0] = {valid, rule index} from wdata. sel CFG_RDEF sets
// the default action.
// The description gives the list of fields, the pointer from the destination trie to a
// memory of remaining fields and the direct comparison; the pointer table, the record
// layout, range comparison for ports (rather than prefix-expanded ports) and the
// default action are this design's choices. The rule memory defaults to 20000
// records, the typical diffserv rule count the description quotes; the pointer table
// to 737280 entries, 16 leaves for each of the 46080 words of the ~90 KB diffserv trie
// the description quotes.
module rule_cmp
  import cls_pkg::*;
#(
  parameter int RULES  = 20000,
  parameter int LEAVES = 737280,
  localparam int RW = $clog2(RULES),
  localparam int LW = $clog2(LEAVES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,
  // completed destination-trie walks
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic             in_err,
  input  logic [LEAF_W-1:0] in_leaf,
  // header buffer read port
  output logic             hdr_rd_en,
  output logic [TAG_W-1:0] hdr_rd_tag,
  input  hdr_t             hdr_rd,
  // classification result
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_err,
  output logic             out_match,
  output logic [7:0]       out_action
);

  typedef struct packed {
    logic          valid;
    logic [RW-1:0] idx;
  } ptr_t;

  ptr_t       ptr [LEAVES];
  rule_t      mem [RULES];
  logic [7:0] def_action;

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.sel == CFG_RULE && !cfg.addr[CFG_AW-1] && cfg.addr < CFG_AW'(RULES))
      mem[RW'(cfg.addr)] <= rule_t'(cfg.wdata[RULE_W-1:0]);
    if (cfg.we && cfg.sel == CFG_RULE && cfg.addr[CFG_AW-1]
        && cfg.addr[CFG_AW-2:0] < (CFG_AW-1)'(LEAVES))
      ptr[LW'(cfg.addr[CFG_AW-2:0])] <= ptr_t'(cfg.wdata[RW:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) def_action <= '0;
    else if (cfg.we && cfg.sel == CFG_RDEF) def_action <= cfg.wdata[7:0];
  end

  // stage 0: pointer read
  logic             s0_valid, s0_err, s0_inrange;
  logic [TAG_W-1:0] s0_tag;
  ptr_t             s0_ptr;

  always_ff @(posedge clk) begin
    if (in_valid) s0_ptr <= ptr[LW'(in_leaf)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_valid   <= 1'b0;
      s0_err     <= 1'b0;
      s0_inrange <= 1'b0;
      s0_tag     <= '0;
    end else begin
      s0_valid   <= in_valid;
      s0_err     <= in_err;
      s0_inrange <= in_leaf < LEAF_W'(LEAVES);
      s0_tag     <= in_tag;
    end
  end

  // stage 1: rule and header read
  logic             s1_valid, s1_err, s1_ok;
  logic [TAG_W-1:0] s1_tag;
  rule_t            s1_rule;

  assign hdr_rd_en  = s0_valid;
  assign hdr_rd_tag = s0_tag;

  always_ff @(posedge clk) begin
    if (s0_valid) s1_rule <= mem[s0_ptr.idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_err   <= 1'b0;
      s1_ok    <= 1'b0;
      s1_tag   <= '0;
    end else begin
      s1_valid <= s0_valid;
      s1_err   <= s0_err;
      s1_ok    <= s0_inrange && s0_ptr.valid && s0_ptr.idx < RW'(RULES);
      s1_tag   <= s0_tag;
    end
  end

  // stage 2: compare
  logic hit;

  always_comb begin
    hit = s1_rule.valid && s1_ok && !s1_err
       && (((hdr_rd.proto ^ s1_rule.proto) & s1_rule.proto_mask) == '0)
       && (hdr_rd.sport >= s1_rule.sport_lo) && (hdr_rd.sport <= s1_rule.sport_hi)
       && (hdr_rd.dport >= s1_rule.dport_lo) && (hdr_rd.dport <= s1_rule.dport_hi)
       && (((hdr_rd.tos ^ s1_rule.tos) & s1_rule.tos_mask) == '0)
       && (((hdr_rd.tos[7:2] ^ s1_rule.dscp) & s1_rule.dscp_mask) == '0)
       && (((hdr_rd.flags ^ s1_rule.flags) & s1_rule.flags_mask) == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_tag    <= '0;
      out_err    <= 1'b0;
      out_match  <= 1'b0;
      out_action <= '0;
    end else begin
      out_valid  <= s1_valid;
      out_tag    <= s1_tag;
      out_err    <= s1_err;
      out_match  <= hit;
      out_action <= hit ? s1_rule.action : def_action;
    end
  end

endmodule
