// Header buffer: the fields a classification compares after the two address tries.
//
// When a packet enters the engine its protocol, ports, ToS/DSCP byte and flags are
// written here under the packet's tag; the rule comparator reads them back by tag
// when the destination-trie walk completes. This keeps the 128-bit address contexts
// that travel round the stages free of fields the tries never look at. One write and
// one synchronous read port (rd_hdr valid the cycle after rd_en). The description
// lists the compared fields; keeping them in a tag-indexed buffer is this design's
// choice.
module hdr_buf
  import cls_pkg::*;
(
  input  logic             clk,
  input  logic             wr_en,
  input  logic [TAG_W-1:0] wr_tag,
  input  hdr_t             wr_hdr,
  input  logic             rd_en,
  input  logic [TAG_W-1:0] rd_tag,
  output hdr_t             rd_hdr
);

  hdr_t mem [2**TAG_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_tag] <= wr_hdr;
    if (rd_en) rd_hdr <= mem[rd_tag];
  end

endmodule
