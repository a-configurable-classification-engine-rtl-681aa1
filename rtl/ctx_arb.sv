// Round-robin valid/ready arbiter.
//
// Merges N requesters carrying W-bit payloads onto one output. The requester after
// the last one granted has the highest priority, so no stage can starve another.
// A requester is told ready only in the cycle it is granted and the output is ready;
// grant is combinational, the priority pointer moves after each accepted transfer.
// Used between the lookup stages (IPv6 classification hands the destination trie to
// stage 3 from either stage 1 or 2) and to merge the stages' completed lookups. The
// stages are chained as in the description; the arbitration policy is this design's.
module ctx_arb #(
  parameter int N = 4,
  parameter int W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     in_valid,
  output logic [N-1:0]     in_ready,
  input  logic [N*W-1:0]   in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [W-1:0]     out_data
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;
  logic [IW-1:0] sel;
  logic          found;
  logic [IW:0]   cand;

  always_comb begin
    sel   = '0;
    found = 1'b0;
    cand  = '0;
    for (int k = 0; k < N; k++) begin
      cand = {1'b0, ptr} + (IW+1)'(k);
      if (cand >= (IW+1)'(N)) cand = cand - (IW+1)'(N);
      if (!found && in_valid[cand[IW-1:0]]) begin
        found = 1'b1;
        sel   = cand[IW-1:0];
      end
    end
    out_valid = found;
    out_data  = in_data[sel*W +: W];
    in_ready  = '0;
    in_ready[sel] = found && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ptr <= '0;
    else if (out_valid && out_ready)  ptr <= (int'(sel) == N-1) ? '0 : sel + IW'(1);
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_ready));
  a_grant_valid:  assert property (@(posedge clk) disable iff (!rst_n) (in_ready & ~in_valid) == '0);

endmodule
