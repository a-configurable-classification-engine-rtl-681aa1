// Trie SRAM of one pipeline stage (memories M0-M3).
//
// Each stage owns a memory that holds its eight trie levels for every address space.
// The memory is split into NUM_BANKS equal partitions of WORDS entries: one per
// address space plus a spare partition into which software loads a rebuilt trie
// before swapping it in. Partition b, word w lives at entry b*WORDS + w.
// Only this stage reads the memory, at most once per cycle, so lookups never
// contend for it. Reads are synchronous: rd_data is valid the cycle after rd_en.
// A separate write port lets software load tables while lookups run (1R1W array).
// The per-stage partitioning by level and by address space follows the design
// description. WORDS differs per stage (set by the top level); the default is the
// stage-0 size, 65536 words. The exact sizes and the 1R1W organisation are this
// implementation's choices.
module trie_mem
  import cls_pkg::*;
#(
  parameter int NBANK = NUM_BANKS,
  parameter int WORDS = 65536,
  localparam int DEPTH = NBANK * WORDS,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [BANK_W-1:0] rd_bank,
  input  logic [WORD_AW-1:0] rd_word,
  output trie_word_t       rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  trie_word_t       wr_data
);

  trie_word_t mem [DEPTH];

  logic [AW-1:0] rd_addr;
  assign rd_addr = AW'(rd_bank * WORDS + rd_word);

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
