// Sum of 1's (one of the four blocks of a lookup pipeline).
//
// Counts the internal children (ones) among the masked topology bits, i.e. the
// internal siblings that precede the selected child in breadth-first order, and the
// leaf siblings (zeros) that precede it. Adding these counts to the word's stored
// bases gives the word index of the selected child when it is internal, or its leaf
// index when it is a leaf. The counting of ones follows the compacted-trie lookup of
// the description; storing a child base and a leaf base with every word, in place of
// a per-level count table, is this implementation's choice so that one word read
// per level suffices. Combinational.
module ones_sum
  import cls_pkg::*;
(
  input  logic [DEGREE-1:0]  bits,
  input  logic [DEGREE-1:0]  mask,
  input  logic [NIB_W-1:0]   nib,
  input  logic [WORD_AW-1:0] child_base,
  input  logic [LEAF_W-1:0]  leaf_base,
  output logic [WORD_AW-1:0] next_word,
  output logic [LEAF_W-1:0]  leaf_idx
);

  logic [NIB_W:0] ones;
  logic [NIB_W:0] zeros;
  logic [DEGREE-1:0] m;

  always_comb begin
    m    = bits & mask;
    ones = '0;
    for (int i = 0; i < DEGREE; i++) ones = ones + (NIB_W+1)'(m[i]);
    zeros     = {1'b0, nib} - ones;
    next_word = child_base + WORD_AW'(ones);
    leaf_idx  = leaf_base + LEAF_W'(zeros);
  end

endmodule
