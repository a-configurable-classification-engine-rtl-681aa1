// Self-checking test of hdr_buf: fills every tag with random headers, reads them
// back in random order (data one cycle after the read) and checks against a copy.
module hdr_buf_tb;
  import cls_pkg::*;

  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [TAG_W-1:0] wr_tag = '0, rd_tag = '0;
  hdr_t wr_hdr = '0, rd_hdr;
  hdr_t ref_hdr [2**TAG_W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hdr_buf dut (.clk(clk), .wr_en(wr_en), .wr_tag(wr_tag), .wr_hdr(wr_hdr),
               .rd_en(rd_en), .rd_tag(rd_tag), .rd_hdr(rd_hdr));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int t = 0; t < 2**TAG_W; t++) begin
        @(negedge clk);
        wr_en = 1; wr_tag = TAG_W'(t);
        wr_hdr = hdr_t'({$urandom, $urandom});
        ref_hdr[t] = wr_hdr;
      end
      @(negedge clk) wr_en = 0;
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        rd_en = 1; rd_tag = TAG_W'($urandom);
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rd_hdr != ref_hdr[rd_tag]) begin
          failures++;
          $display("tag %0d: %h expected %h", rd_tag, rd_hdr, ref_hdr[rd_tag]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
