// Final state logic (last of the four blocks of a lookup pipeline).
//
// Decides what a context does after a level has been resolved:
//   LOOP     the selected child is internal and its level lives in this stage:
//            go round the stage again with the child's word;
//   HANDOFF  the child's level lives in a later stage, or (classification) the
//            source trie ended in a leaf and the destination trie must be walked:
//            pass the context on; `tgt` names the receiving stage;
//   COMPLETE a leaf ends the lookup (next-hop DRAM index for forwarding, rule
//            pointer for classification), or the trie is deeper than the key,
//            which is reported as an error result.
// The root of the destination trie that belongs to a source leaf is stored at word
// number <source leaf index> of the destination stage's partition: this linkage of
// the array of tries is this implementation's choice. Combinational.
module final_state
  import cls_pkg::*;
#(
  parameter logic [1:0] STAGE = 2'd0
) (
  input  ctx_t               ctx,
  input  logic               child_int,
  input  logic [WORD_AW-1:0] next_word,
  input  logic [LEAF_W-1:0]  leaf_idx,
  output logic               act_loop,
  output logic               act_handoff,
  output logic               act_complete,
  output logic [1:0]         tgt,
  output ctx_t               nctx,
  output result_t            res
);

  always_comb begin
    nctx         = ctx;
    act_loop     = 1'b0;
    act_handoff  = 1'b0;
    act_complete = 1'b0;
    tgt          = STAGE;
    res          = '{tag: ctx.tag, kind: RES_FWD, cls: ctx.cls, bank: ctx.bank, leaf: leaf_idx};
    if (child_int) begin
      if (ctx.level == last_level(ctx.cls, ctx.ipv6)) begin
        act_complete = 1'b1;
        res.kind     = RES_ERR;
      end else begin
        nctx.level = ctx.level + 5'd1;
        nctx.word  = next_word;
        tgt        = stage_of(ctx.cls, ctx.ipv6, ctx.trie, nctx.level);
        act_loop    = (tgt == STAGE);
        act_handoff = (tgt != STAGE);
      end
    end else if (ctx.cls && !ctx.trie) begin
      nctx.trie   = 1'b1;
      nctx.level  = 5'd0;
      nctx.word   = WORD_AW'(leaf_idx);
      tgt         = stage_of(1'b1, ctx.ipv6, 1'b1, 5'd0);
      act_handoff = 1'b1;
    end else begin
      act_complete = 1'b1;
      res.kind     = ctx.cls ? RES_CLS : RES_FWD;
    end
  end

endmodule
