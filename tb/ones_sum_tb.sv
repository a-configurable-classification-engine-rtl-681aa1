// Self-checking test of ones_sum: random words, nibbles and bases; the expected
// child word and leaf index are counted child by child in the testbench.
module ones_sum_tb;
  import cls_pkg::*;

  logic [DEGREE-1:0]  bits, mask;
  logic [NIB_W-1:0]   nib;
  logic [WORD_AW-1:0] child_base, next_word;
  logic [LEAF_W-1:0]  leaf_base, leaf_idx;
  int checks = 0, failures = 0;

  ones_sum dut (.bits(bits), .mask(mask), .nib(nib), .child_base(child_base),
                .leaf_base(leaf_base), .next_word(next_word), .leaf_idx(leaf_idx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int o, z;
      bits       = 16'($urandom);
      nib        = 4'($urandom);
      mask       = (16'd1 << nib) - 16'd1;
      child_base = 16'($urandom_range(0, 60000));
      leaf_base  = 22'($urandom_range(0, 4000000));
      #1;
      o = 0; z = 0;
      for (int i = 0; i < int'(nib); i++) if (bits[i]) o++; else z++;
      checks++;
      if (int'(next_word) != int'(child_base) + o || int'(leaf_idx) != int'(leaf_base) + z) begin
        failures++;
        if (failures < 5) $display("mismatch %h nib %0d: %0d %0d", bits, nib, next_word, leaf_idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
