// context_memory: configuration store of the RC array.
//
// Organised, as in M1, as 2 blocks x 8 sets x 16 words x 32 bits. Block 0
// holds the row contexts (set r drives array row r), block 1 the column
// contexts (set c drives array column c). One read returns the same word
// index from all 8 sets of one block at once, which is the 256-bit context
// broadcast into the array. Words are written one at a time, 32 bits, by the
// DMA controller; writing does not disturb reading, so new contexts can be
// loaded while the array runs.
//
// Interface: write address is {block, set, word} (1+3+4 bits).
// Timing: synchronous read, data valid the cycle after `rd_en`; a write
// and a read of the same word in one cycle return the old word.
// Own choices: the address packing and the read latency.
module context_memory
  import m1_pkg::*;
#(
  parameter int unsigned N     = N_DIM,
  parameter int unsigned WORDS = CTX_WORDS
) (
  input  logic                         clk,
  // write port (DMA)
  input  logic                         wr_en,
  input  logic                         wr_block,
  input  logic [$clog2(N)-1:0]         wr_set,
  input  logic [$clog2(WORDS)-1:0]     wr_word,
  input  logic [CTX_W-1:0]             wr_data,
  // broadcast read port (array controller)
  input  logic                         rd_en,
  input  logic                         rd_block,
  input  logic [$clog2(WORDS)-1:0]     rd_word,
  output ctx_word_t                    rd_data [N]
);

  for (genvar s = 0; s < N; s++) begin : g_set
    logic [CTX_W-1:0] mem [2][WORDS];
    logic [CTX_W-1:0] q;

    always_ff @(posedge clk) begin
      if (wr_en && wr_set == s[$clog2(N)-1:0]) mem[wr_block][wr_word] <= wr_data;
      if (rd_en) q <= mem[rd_block][rd_word];
    end

    assign rd_data[s] = ctx_word_t'(q);
  end

endmodule
