// Self-checking test of ctx_arb with four requesters: random requests and output
// back-pressure; checks that the output carries the granted requester's data, that
// the grant is the first requester at or after the one following the last grant
// (round robin), and that every request is eventually served.
module ctx_arb_tb;
  localparam int N = 4, W = 12;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = '0, in_ready;
  logic [N*W-1:0] in_data = '0;
  logic out_valid, out_ready = 0;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0;
  int last = N-1;
  int served [N];

  always #5 clk = ~clk;

  ctx_arb #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_ready(in_ready), .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready),
    .out_data(out_data));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (served[i]) served[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int exp_g;
      @(negedge clk);
      // requests stay up until served, new ones appear randomly
      for (int i = 0; i < N; i++) begin
        if (!in_valid[i] && $urandom_range(0, 2) == 0) begin
          in_valid[i] = 1'b1;
          in_data[i*W +: W] = W'({i[1:0], 10'($urandom)});
        end
      end
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      exp_g = -1;
      for (int k = 1; k <= N; k++) if (exp_g < 0 && in_valid[(last + k) % N]) exp_g = (last + k) % N;
      checks++;
      if (out_valid != (in_valid != '0)) failures++;
      if (exp_g >= 0) begin
        if (out_data != in_data[exp_g*W +: W]) failures++;
        if (in_ready != (out_ready ? N'(1) << exp_g : '0)) begin
          failures++;
          if (failures < 5) $display("grant %b expected %0d", in_ready, exp_g);
        end
      end
      @(posedge clk);
      #1;
      if (exp_g >= 0 && out_ready) begin
        last = exp_g;
        served[exp_g]++;
        in_valid[exp_g] = 1'b0;
      end
    end
    foreach (served[i]) begin
      checks++;
      if (served[i] < 100) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
