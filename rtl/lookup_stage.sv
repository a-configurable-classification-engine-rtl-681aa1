// One pipeline stage of the lookup engine (stage 1..4 of the design: parameter STAGE 0..3).
//
// A stage owns the trie memory of eight trie levels and resolves one level per trip
// round a four-phase ring built from the four blocks of a lookup pipeline:
//   P0 SRAM access    read the word of the node being visited (synchronous read),
//   P1 mask gen       pick the key nibble of this level, mask the bits below it,
//   P2 sum of 1's     count internal/leaf siblings below it, add the word's bases,
//   P3 final state    loop to P0 for the next level, hand off to a later stage, or
//                     complete with a leaf index.
// One level takes four cycles, so an IPv4 lookup (8 levels) resolves in 32 cycles and
// an IPv6 /64 lookup (16 levels over two stages) in 64, as the description states.
// Up to four packets are in flight in a stage, one per phase; the memory is read by
// at most one of them per cycle, so there is no contention. Lookups end early when a
// leaf is reached (no constant lookup time).
//
// Interface: in_* accepts a context into P0 when the slot leaving P3 is free
// (in_ready is low while a packet loops or waits). ho_* hands a context to the stage
// named by ho_tgt; res_* delivers a completed lookup. A context whose handoff or
// result is not accepted keeps its place in the ring and retries four cycles later.
// mem_wr_* is the software write port of the stage memory.
// The ring organisation, the retry behaviour and the accept rule are this
// implementation's choices; the description gives the four blocks, the 8 levels per
// stage and the per-stage memory.
module lookup_stage
  import cls_pkg::*;
#(
  parameter logic [1:0] STAGE = 2'd0,
  parameter int         NBANK = NUM_BANKS,
  parameter int         WORDS = 65536,
  localparam int        MAW   = $clog2(NBANK * WORDS)
) (
  input  logic       clk,
  input  logic       rst_n,
  // entry
  input  logic       in_valid,
  output logic       in_ready,
  input  ctx_t       in_ctx,
  // handoff to a later stage
  output logic       ho_valid,
  input  logic       ho_ready,
  output ctx_t       ho_ctx,
  output logic [1:0] ho_tgt,
  // completed lookups
  output logic       res_valid,
  input  logic       res_ready,
  output result_t    res,
  // software write port of the stage memory
  input  logic       mem_wr_en,
  input  logic [MAW-1:0] mem_wr_addr,
  input  trie_word_t mem_wr_data
);

  typedef struct packed {
    logic       valid;
    logic       hold;       // waiting for a handoff / result port, decision stored below
    logic       h_handoff;  // stored decision: 1 handoff, 0 complete
    logic [1:0] h_tgt;
    result_t    h_res;
    ctx_t       ctx;
  } slot_t;

  slot_t p0, p1, p2, p3;

  // P2 / P3 data registers
  logic [DEGREE-1:0]  p2_bits, p2_mask;
  logic [NIB_W-1:0]   p2_nib;
  logic               p2_int;
  logic [WORD_AW-1:0] p2_cbase;
  logic [LEAF_W-1:0]  p2_lbase;
  logic               p3_int;
  logic [WORD_AW-1:0] p3_next;
  logic [LEAF_W-1:0]  p3_leaf;

  // ---------------- P0: SRAM access ----------------
  trie_word_t rd_data;

  trie_mem #(.NBANK(NBANK), .WORDS(WORDS)) u_mem (
    .clk     (clk),
    .rd_en   (p0.valid && !p0.hold),
    .rd_bank (p0.ctx.bank),
    .rd_word (p0.ctx.word),
    .rd_data (rd_data),
    .wr_en   (mem_wr_en),
    .wr_addr (mem_wr_addr),
    .wr_data (mem_wr_data)
  );

  // ---------------- P1: mask generation ----------------
  logic [NIB_W-1:0]  mg_nib;
  logic [DEGREE-1:0] mg_mask;
  logic              mg_int;

  mask_gen u_mask (
    .ctx       (p1.ctx),
    .bits      (rd_data.bits),
    .nib       (mg_nib),
    .mask      (mg_mask),
    .child_int (mg_int)
  );

  // ---------------- P2: sum of ones ----------------
  logic [WORD_AW-1:0] os_next;
  logic [LEAF_W-1:0]  os_leaf;

  ones_sum u_sum (
    .bits       (p2_bits),
    .mask       (p2_mask),
    .nib        (p2_nib),
    .child_base (p2_cbase),
    .leaf_base  (p2_lbase),
    .next_word  (os_next),
    .leaf_idx   (os_leaf)
  );

  // ---------------- P3: final state ----------------
  logic       fs_loop, fs_handoff, fs_complete;
  logic [1:0] fs_tgt;
  ctx_t       fs_ctx;
  result_t    fs_res;

  final_state #(.STAGE(STAGE)) u_final (
    .ctx          (p3.ctx),
    .child_int    (p3_int),
    .next_word    (p3_next),
    .leaf_idx     (p3_leaf),
    .act_loop     (fs_loop),
    .act_handoff  (fs_handoff),
    .act_complete (fs_complete),
    .tgt          (fs_tgt),
    .nctx         (fs_ctx),
    .res          (fs_res)
  );

  logic  want_ho, want_res, leaving, recirc;
  slot_t back;

  always_comb begin
    want_ho  = 1'b0;
    want_res = 1'b0;
    ho_ctx   = p3.ctx;
    ho_tgt   = p3.h_tgt;
    res      = p3.h_res;
    back     = p3;
    if (p3.valid) begin
      if (p3.hold) begin
        want_ho  = p3.h_handoff;
        want_res = !p3.h_handoff;
      end else begin
        want_ho  = fs_handoff;
        want_res = fs_complete;
        ho_ctx   = fs_ctx;
        ho_tgt   = fs_tgt;
        res      = fs_res;
        back.ctx       = fs_ctx;
        back.hold      = !fs_loop;
        back.h_handoff = fs_handoff;
        back.h_tgt     = fs_tgt;
        back.h_res     = fs_res;
      end
    end
    ho_valid  = want_ho;
    res_valid = want_res;
    leaving   = (want_ho && ho_ready) || (want_res && res_ready);
    recirc    = p3.valid && !leaving;
    in_ready  = !recirc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p0 <= '0;
      p1 <= '0;
      p2 <= '0;
      p3 <= '0;
      p2_bits  <= '0;
      p2_mask  <= '0;
      p2_nib   <= '0;
      p2_int   <= 1'b0;
      p2_cbase <= '0;
      p2_lbase <= '0;
      p3_int   <= 1'b0;
      p3_next  <= '0;
      p3_leaf  <= '0;
    end else begin
      if (recirc)        p0 <= back;
      else if (in_valid) p0 <= '{valid: 1'b1, hold: 1'b0, h_handoff: 1'b0, h_tgt: 2'd0,
                                 h_res: '0, ctx: in_ctx};
      else               p0 <= '0;
      p1 <= p0;
      p2 <= p1;
      p3 <= p2;
      p2_bits  <= rd_data.bits;
      p2_mask  <= mg_mask;
      p2_nib   <= mg_nib;
      p2_int   <= mg_int;
      p2_cbase <= rd_data.child_base;
      p2_lbase <= rd_data.leaf_base;
      p3_int   <= p2_int;
      p3_next  <= os_next;
      p3_leaf  <= os_leaf;
    end
  end

  // A slot leaves through exactly one port.
  a_one_exit: assert property (@(posedge clk) disable iff (!rst_n) !(ho_valid && res_valid));
  // A handoff always goes to a later stage.
  a_forward_only: assert property (@(posedge clk) disable iff (!rst_n) ho_valid |-> ho_tgt > STAGE);

endmodule
