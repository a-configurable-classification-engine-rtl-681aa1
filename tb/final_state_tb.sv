// Self-checking test of final_state: directed cases for each decision (loop inside
// the stage, handoff to the next level's stage, start of the destination trie,
// forwarding / classification completion, trie deeper than the key) in every stage.
module final_state_tb;
  import cls_pkg::*;

  ctx_t               ctx [4];
  logic               child_int;
  logic [WORD_AW-1:0] next_word;
  logic [LEAF_W-1:0]  leaf_idx;
  logic               lp [4], ho [4], cp [4];
  logic [1:0]         tgt [4];
  ctx_t               nctx [4];
  result_t            res [4];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < 4; s++) begin : g
    final_state #(.STAGE(2'(s))) dut (
      .ctx(ctx[s]), .child_int(child_int), .next_word(next_word), .leaf_idx(leaf_idx),
      .act_loop(lp[s]), .act_handoff(ho[s]), .act_complete(cp[s]), .tgt(tgt[s]),
      .nctx(nctx[s]), .res(res[s]));
  end

  task automatic check(int s, bit e_lp, bit e_ho, bit e_cp, int e_tgt, int e_level,
                       int e_word, bit e_trie, res_kind_e e_kind);
    checks++;
    if (lp[s] !== e_lp || ho[s] !== e_ho || cp[s] !== e_cp
        || (e_ho && (int'(tgt[s]) != e_tgt || int'(nctx[s].level) != e_level
                     || int'(nctx[s].word) != e_word || nctx[s].trie != e_trie))
        || (e_lp && (int'(nctx[s].level) != e_level || int'(nctx[s].word) != e_word))
        || (e_cp && (res[s].kind != e_kind || res[s].tag != ctx[s].tag
                     || (e_kind != RES_ERR && res[s].leaf != leaf_idx)))) begin
      failures++;
      $display("case fail stage %0d: lp%0d ho%0d cp%0d tgt%0d lvl%0d word%0d kind %0d",
               s, lp[s], ho[s], cp[s], tgt[s], nctx[s].level, nctx[s].word, res[s].kind);
    end
  endtask

  task automatic set(int s, bit ipv6, bit cls, bit trie, int level);
    ctx[s]       = '0;
    ctx[s].tag   = TAG_W'($urandom);
    ctx[s].ipv6  = ipv6;
    ctx[s].cls   = cls;
    ctx[s].trie  = trie;
    ctx[s].level = 5'(level);
    ctx[s].word  = 16'($urandom);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    next_word = 16'd1234;
    leaf_idx  = 22'd98765;
    foreach (ctx[i]) ctx[i] = '0;
    // internal child, same stage: loop
    child_int = 1'b1;
    set(0, 0, 0, 0, 3);   #1 check(0, 1, 0, 0, 0, 4, 1234, 0, RES_FWD);
    set(2, 1, 0, 0, 17);  #1 check(2, 1, 0, 0, 2, 18, 1234, 0, RES_FWD);
    // internal child at level 7 of IPv6 forwarding: hand to stage 1
    set(0, 1, 0, 0, 7);   #1 check(0, 0, 1, 0, 1, 8, 1234, 0, RES_FWD);
    set(1, 1, 0, 0, 15);  #1 check(1, 0, 1, 0, 2, 16, 1234, 0, RES_FWD);
    set(2, 1, 0, 0, 23);  #1 check(2, 0, 1, 0, 3, 24, 1234, 0, RES_FWD);
    // internal child below the last level: error
    set(0, 0, 0, 0, 7);   #1 check(0, 0, 0, 1, 0, 0, 0, 0, RES_ERR);
    set(3, 1, 0, 0, 31);  #1 check(3, 0, 0, 1, 0, 0, 0, 0, RES_ERR);
    set(1, 0, 1, 1, 7);   #1 check(1, 0, 0, 1, 0, 0, 0, 0, RES_ERR);
    set(3, 1, 1, 1, 15);  #1 check(3, 0, 0, 1, 0, 0, 0, 0, RES_ERR);
    // IPv6 classification source trie crosses from stage 0 to 1
    set(0, 1, 1, 0, 7);   #1 check(0, 0, 1, 0, 1, 8, 1234, 0, RES_FWD);
    // leaf: forwarding completes
    child_int = 1'b0;
    set(0, 0, 0, 0, 5);   #1 check(0, 0, 0, 1, 0, 0, 0, 0, RES_FWD);
    set(3, 1, 0, 0, 27);  #1 check(3, 0, 0, 1, 0, 0, 0, 0, RES_FWD);
    // leaf in a source trie: start destination trie
    set(0, 0, 1, 0, 2);   #1 check(0, 0, 1, 0, 1, 0, int'(leaf_idx[15:0]), 1, RES_FWD);
    set(0, 1, 1, 0, 3);   #1 check(0, 0, 1, 0, 2, 0, int'(leaf_idx[15:0]), 1, RES_FWD);
    set(1, 1, 1, 0, 12);  #1 check(1, 0, 1, 0, 2, 0, int'(leaf_idx[15:0]), 1, RES_FWD);
    // leaf in a destination trie: classification completes
    set(1, 0, 1, 1, 4);   #1 check(1, 0, 0, 1, 0, 0, 0, 0, RES_CLS);
    set(3, 1, 1, 1, 9);   #1 check(3, 0, 0, 1, 0, 0, 0, 0, RES_CLS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
