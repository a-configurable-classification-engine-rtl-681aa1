// Configurable forwarding / firewall / diffserv lookup engine (top level).
//
// A packet's addresses are resolved by walking compacted 16-way tries spread over
// four pipeline stages, each with its own trie memory holding eight trie levels:
// stage 0 levels 0-7, stage 1 levels 8-15, stage 2 levels 16-23, stage 3 levels 24-31.
// In forwarding mode the trie is built over the destination address: IPv4 lookups end
// in stage 0, IPv6 lookups continue as far as their prefix requires and the leaf
// reached names the off-chip DRAM entry holding the next hop. In classification mode
// (firewall or diffserv, chosen by the rules software loads) the same datapath walks
// an array of tries: a source-address trie whose leaf selects a destination-address
// trie whose leaf points to a rule record; the remaining header fields are then
// compared directly to give the action. IPv4 classification uses stage 0 for the
// source and stage 1 for the destination trie; IPv6 classification walks /64 tries,
// source in stages 0-1 and destination in stages 2-3.
//
// Ports:
//   cfg            software configuration bus (mode, address-space selector, the four
//                  trie memories, rule memory, default action; see cls_pkg::cfg_sel_e)
//   req_*          lookup request with valid/ready; req_tag must be unique among the
//                  packets in flight (at most 32)
//   fwd_*          forwarding result: DRAM index {bank, leaf} of the next hop, or err
//   cls_*          classification result: matched flag and action, or err
// Timing: a forwarding lookup that ends at trie level L (0-based) shows on fwd_* 4*(L+1)
// + 1 cycles after the clock edge that accepts it, when nothing waits (32 cycles of trie walk for a
// full IPv4 lookup); classification adds the destination walk and three cycles of rule
// lookup and comparison. Lookups finish out of order, matched by tag.
// Each stage memory has nine banks (eight address spaces and a spare) of WORDS<s>
// words. The sizes are unequal: one address space takes 288 KB in all, most of it in
// stages 0 and 1, because most prefixes end there (IPv4 /24, IPv6 /64).
// The stage structure, level split, memory partitions by space and level, spare bank
// and array-of-tries flow follow the description; the exact stage sizes are this
// design's; interfaces, tags, mode register and error reporting
// are this implementation's.
module cls_engine
  import cls_pkg::*;
#(
  // words per bank (address space) in each stage: 147456 16-bit words = 288 KB per
  // address space, weighted towards the levels most prefixes end in
  parameter int WORDS0 = 65536,   // levels 0-7: all of IPv4, the /24 peak
  parameter int WORDS1 = 40960,   // levels 8-15: IPv6 up to the /64 peak
  parameter int WORDS2 = 20480,   // levels 16-23
  parameter int WORDS3 = 20480,   // levels 24-31
  parameter int RULES  = 20000,   // rule records
  parameter int LEAVES = 737280   // leaf pointer entries of the rule memory
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  // lookup requests
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [TAG_W-1:0]  req_tag,
  input  logic              req_ipv6,
  input  logic [127:0]      req_src,
  input  logic [127:0]      req_dst,
  input  hdr_t              req_hdr,
  // forwarding results (next-hop DRAM read index)
  output logic              fwd_valid,
  output logic [TAG_W-1:0]  fwd_tag,
  output logic              fwd_err,
  output logic [BANK_W+LEAF_W-1:0] fwd_dram_addr,
  // classification results
  output logic              cls_valid,
  output logic [TAG_W-1:0]  cls_tag,
  output logic              cls_err,
  output logic              cls_match,
  output logic [7:0]        cls_action
);

  // ---------------- mode register ----------------
  logic mode_cls;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_cls <= 1'b0;
    else if (cfg.we && cfg.sel == CFG_ENGINE && cfg.addr == '0) mode_cls <= cfg.wdata[0];
  end

  // ---------------- entry: address-space / bank selection ----------------
  logic [BANK_W-1:0] bank;
  logic              dfirst;

  as_select u_assel (
    .clk   (clk),
    .rst_n (rst_n),
    .cfg   (cfg),
    .cls   (mode_cls),
    .ipv6  (req_ipv6),
    .octet (req_ipv6 ? req_dst[127:120] : req_dst[31:24]),
    .proto (req_hdr.proto),
    .as_id (),
    .bank  (bank),
    .dfirst(dfirst)
  );

  ctx_t req_ctx;

  always_comb begin
    req_ctx       = '0;
    req_ctx.tag   = req_tag;
    req_ctx.ipv6  = req_ipv6;
    req_ctx.cls   = mode_cls;
    req_ctx.bank  = bank;
    req_ctx.dfirst = dfirst;
    req_ctx.src   = req_src;
    req_ctx.dst   = req_dst;
  end

  logic             hdr_rd_en;
  logic [TAG_W-1:0] hdr_rd_tag;
  hdr_t             hdr_rd;

  hdr_buf u_hdr (
    .clk    (clk),
    .wr_en  (req_valid && req_ready),
    .wr_tag (req_tag),
    .wr_hdr (req_hdr),
    .rd_en  (hdr_rd_en),
    .rd_tag (hdr_rd_tag),
    .rd_hdr (hdr_rd)
  );

  // ---------------- the four stages ----------------
  logic       st_in_valid [NSTAGE];
  logic       st_in_ready [NSTAGE];
  ctx_t       st_in_ctx   [NSTAGE];
  logic       st_ho_valid [NSTAGE];
  logic       st_ho_ready [NSTAGE];
  ctx_t       st_ho_ctx   [NSTAGE];
  logic [1:0] st_ho_tgt   [NSTAGE];
  logic [NSTAGE-1:0] st_res_valid, st_res_ready;
  result_t    st_res      [NSTAGE];
  logic [NSTAGE*RES_W-1:0] st_res_flat;

  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    localparam int SW  = (s == 0) ? WORDS0 : (s == 1) ? WORDS1 : (s == 2) ? WORDS2 : WORDS3;
    localparam int SAW = $clog2(NUM_BANKS * SW);
    lookup_stage #(.STAGE(2'(s)), .NBANK(NUM_BANKS), .WORDS(SW)) u_stage (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_valid    (st_in_valid[s]),
      .in_ready    (st_in_ready[s]),
      .in_ctx      (st_in_ctx[s]),
      .ho_valid    (st_ho_valid[s]),
      .ho_ready    (st_ho_ready[s]),
      .ho_ctx      (st_ho_ctx[s]),
      .ho_tgt      (st_ho_tgt[s]),
      .res_valid   (st_res_valid[s]),
      .res_ready   (st_res_ready[s]),
      .res         (st_res[s]),
      .mem_wr_en   (cfg.we && cfg.sel == cfg_sel_e'(int'(CFG_MEM0) + s)),
      .mem_wr_addr (SAW'(cfg.addr)),
      .mem_wr_data (trie_word_t'(cfg.wdata[TW_W-1:0]))
    );
    assign st_res_flat[s*RES_W +: RES_W] = st_res[s];
  end

  // stage 0 takes new requests
  assign st_in_valid[0] = req_valid;
  assign st_in_ctx[0]   = req_ctx;
  assign req_ready      = st_in_ready[0];

  // stage 0 -> stage 1
  assign st_in_valid[1] = st_ho_valid[0] && st_ho_tgt[0] == 2'd1;
  assign st_in_ctx[1]   = st_ho_ctx[0];

  // stage 0 (IPv6 destination trie start) or stage 1 -> stage 2
  logic [1:0]         a2_valid, a2_ready;
  logic [2*CTX_W-1:0] a2_data;
  logic [CTX_W-1:0]   a2_out;

  assign a2_valid = {st_ho_valid[1], st_ho_valid[0] && st_ho_tgt[0] == 2'd2};
  assign a2_data  = {st_ho_ctx[1], st_ho_ctx[0]};

  ctx_arb #(.N(2), .W(CTX_W)) u_arb2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (a2_valid),
    .in_ready  (a2_ready),
    .in_data   (a2_data),
    .out_valid (st_in_valid[2]),
    .out_ready (st_in_ready[2]),
    .out_data  (a2_out)
  );

  assign st_in_ctx[2]   = ctx_t'(a2_out);
  assign st_ho_ready[0] = (st_ho_tgt[0] == 2'd1) ? st_in_ready[1] : a2_ready[0];
  assign st_ho_ready[1] = a2_ready[1];

  // stage 2 -> stage 3
  assign st_in_valid[3] = st_ho_valid[2];
  assign st_in_ctx[3]   = st_ho_ctx[2];
  assign st_ho_ready[2] = st_in_ready[3];
  assign st_ho_ready[3] = 1'b0;   // the last stage never hands off

  // ---------------- completed lookups ----------------
  logic                res_valid;
  logic [RES_W-1:0]    res_flat;
  result_t             res;

  ctx_arb #(.N(NSTAGE), .W(RES_W)) u_resarb (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (st_res_valid),
    .in_ready  (st_res_ready),
    .in_data   (st_res_flat),
    .out_valid (res_valid),
    .out_ready (1'b1),
    .out_data  (res_flat)
  );

  assign res = result_t'(res_flat);

  // forwarding results: registered DRAM read index
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_valid     <= 1'b0;
      fwd_tag       <= '0;
      fwd_err       <= 1'b0;
      fwd_dram_addr <= '0;
    end else begin
      fwd_valid     <= res_valid && !res.cls;
      fwd_tag       <= res.tag;
      fwd_err       <= res.kind == RES_ERR;
      fwd_dram_addr <= {res.bank, res.leaf};
    end
  end

  // classification results: rule comparison
  rule_cmp #(.RULES(RULES), .LEAVES(LEAVES)) u_rule (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg        (cfg),
    .in_valid   (res_valid && res.cls),
    .in_tag     (res.tag),
    .in_err     (res.kind == RES_ERR),
    .in_leaf    (res.leaf),
    .hdr_rd_en  (hdr_rd_en),
    .hdr_rd_tag (hdr_rd_tag),
    .hdr_rd     (hdr_rd),
    .out_valid  (cls_valid),
    .out_tag    (cls_tag),
    .out_err    (cls_err),
    .out_match  (cls_match),
    .out_action (cls_action)
  );

  a_last_no_handoff: assert property (@(posedge clk) disable iff (!rst_n) !st_ho_valid[3]);
  a_stage1_to_2: assert property (@(posedge clk) disable iff (!rst_n)
                                  st_ho_valid[1] |-> st_ho_tgt[1] == 2'd2);

endmodule
