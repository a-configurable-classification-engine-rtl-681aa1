// Self-checking test of mask_gen: random contexts and topology words; the expected
// nibble is taken by direct bit slicing of the address (IPv4 key in bits 31:0,
// level 0 = most significant nibble) and the expected mask is built bit by bit.
module mask_gen_tb;
  import cls_pkg::*;

  ctx_t              ctx;
  logic [DEGREE-1:0] bits;
  logic [NIB_W-1:0]  nib;
  logic [DEGREE-1:0] mask;
  logic              child_int;
  int checks = 0, failures = 0;

  mask_gen dut (.ctx(ctx), .bits(bits), .nib(nib), .mask(mask), .child_int(child_int));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [127:0] key;
      int e_nib;
      logic [15:0] e_mask;
      ctx = '0;
      ctx.ipv6  = 1'($urandom);
      ctx.cls   = 1'($urandom);
      ctx.trie  = 1'($urandom);
      ctx.dfirst = 1'($urandom);
      ctx.src   = {$urandom, $urandom, $urandom, $urandom};
      ctx.dst   = {$urandom, $urandom, $urandom, $urandom};
      ctx.level = ctx.ipv6 ? 5'($urandom_range(0, 31)) : 5'($urandom_range(0, 7));
      bits      = 16'($urandom);
      #1;
      // first trie walks the source unless the space is destination-first
      key = (ctx.cls && ((ctx.trie == 0) != (ctx.dfirst == 1))) ? ctx.src : ctx.dst;
      if (ctx.ipv6) e_nib = int'(key[127 - 4*ctx.level -: 4]);
      else          e_nib = int'(key[31 - 4*ctx.level -: 4]);
      e_mask = '0;
      for (int i = 0; i < e_nib; i++) e_mask[i] = 1'b1;
      checks++;
      if (int'(nib) != e_nib || mask != e_mask || child_int != bits[e_nib]) begin
        failures++;
        if (failures < 5) $display("mismatch nib %0d/%0d mask %h/%h", nib, e_nib, mask, e_mask);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
