// Self-checking test of trie_mem at a reduced size: random writes to every bank,
// reads one cycle later checked against a copy, and a check that reads do not
// change while rd_en is low.
module trie_mem_tb;
  import cls_pkg::*;

  localparam int NB = 3, W = 100;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [BANK_W-1:0] rd_bank = '0;
  logic [WORD_AW-1:0] rd_word = '0;
  logic [$clog2(NB*W)-1:0] wr_addr = '0;
  trie_word_t rd_data, wr_data = '0, held;
  trie_word_t ref_m [NB*W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trie_mem #(.NBANK(NB), .WORDS(W)) dut (.clk(clk), .rd_en(rd_en), .rd_bank(rd_bank),
    .rd_word(rd_word), .rd_data(rd_data), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NB*W; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 9'(a);
      wr_data = trie_word_t'({$urandom, $urandom});
      ref_m[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int k = 0; k < 500; k++) begin
      int b, w;
      b = $urandom_range(0, NB-1);
      w = $urandom_range(0, W-1);
      @(negedge clk);
      rd_en = 1; rd_bank = BANK_W'(b); rd_word = WORD_AW'(w);
      // a simultaneous write elsewhere must not disturb the read
      wr_en = 1; wr_addr = 9'(((b*W + w) + 1) % (NB*W));
      wr_data = trie_word_t'({$urandom, $urandom});
      ref_m[int'(wr_addr)] = wr_data;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data != ref_m[b*W+w]) begin
        failures++;
        $display("bank %0d word %0d: %h expected %h", b, w, rd_data, ref_m[b*W+w]);
      end
      held = rd_data;
      rd_bank = BANK_W'($urandom_range(0, NB-1));
      @(negedge clk);
      checks++;
      if (rd_data != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
