// Mask generation (one of the four blocks of a lookup pipeline).
//
// Given the trie word just read and the lookup context, selects the key nibble that
// this level consumes, produces the mask of the topology bits that lie below that
// nibble (children that precede it in breadth-first order) and the bit of the
// selected child itself (1 internal, 0 leaf). Purely combinational; the caller
// registers the outputs. Which key bits a level uses (destination address for
// forwarding; for classification the source address in the first trie and the
// destination address in the second, or the reverse when the address space is built
// destination-first; IPv4 keys left-aligned) is this implementation's reading of the
// description.
module mask_gen
  import cls_pkg::*;
(
  input  ctx_t              ctx,
  input  logic [DEGREE-1:0] bits,
  output logic [NIB_W-1:0]  nib,
  output logic [DEGREE-1:0] mask,
  output logic              child_int
);

  logic [127:0] key;

  always_comb begin
    key       = (ctx.cls && ctx.trie == ctx.dfirst) ? ctx.src : ctx.dst;
    nib       = key_nibble(key, ctx.ipv6, ctx.level);
    mask      = (DEGREE'(1) << nib) - DEGREE'(1);
    child_int = bits[nib];
  end

endmodule
