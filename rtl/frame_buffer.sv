// frame_buffer: the data buffer between main memory and the RC array.
//
// Organised, as in M1, as 2 sets x 2 banks (A, B) x 64 words x 64 bits.
// The two sets let the DMA controller fill or drain one set while the array
// works on the other. There are three ports:
//   * array read  - the word at one address of both banks of a set, bank B
//                   in the high half: the data bus of a broadcast;
//   * array write - a write-back of one row or column of 8 cell results of
//                   16 bits: results 0..3 go to bank A, results 4..7 to bank
//                   B, both at the same address of the chosen set;
//   * DMA         - one 64-bit word read or written.
// Timing: reads are synchronous (data the cycle after the enable); a read
// and a write of the same word in one cycle return the old word. If the
// array and the DMA write the same word in the same cycle the array wins.
// Own choices: the port set, the split of a 128-bit write-back over the two
// banks, and the priority rule.
module frame_buffer
  import m1_pkg::*;
#(
  parameter int unsigned DEPTH = FB_DEPTH,
  parameter int unsigned WIDTH = FB_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  // array read port
  input  logic               ar_en,
  input  logic               ar_set,
  input  logic [AW-1:0]      ar_addr,
  output logic [2*WIDTH-1:0] ar_data,
  // array write-back port
  input  logic               aw_en,
  input  logic               aw_set,
  input  logic [AW-1:0]      aw_addr,
  input  logic [2*WIDTH-1:0] aw_data,
  // DMA port
  input  logic               d_en,
  input  logic               d_we,
  input  logic               d_set,
  input  logic               d_bank,
  input  logic [AW-1:0]      d_addr,
  input  logic [WIDTH-1:0]   d_wdata,
  output logic [WIDTH-1:0]   d_rdata
);

  logic [WIDTH-1:0] rd_a [2][2];   // read data of each set/bank, array port
  logic [WIDTH-1:0] rd_d [2][2];   // read data of each set/bank, DMA port
  logic             sel_ar_set, sel_d_set, sel_d_bank;

  for (genvar s = 0; s < 2; s++) begin : g_set
    for (genvar k = 0; k < 2; k++) begin : g_bank
      logic [WIDTH-1:0] mem [DEPTH];
      logic [WIDTH-1:0] q_a, q_d;

      always_ff @(posedge clk) begin
        if (d_en && d_we && d_set == s[0] && d_bank == k[0]) mem[d_addr] <= d_wdata;
        if (aw_en && aw_set == s[0]) mem[aw_addr] <= aw_data[k*WIDTH +: WIDTH];
        if (ar_en) q_a <= mem[ar_addr];
        if (d_en)  q_d <= mem[d_addr];
      end

      assign rd_a[s][k] = q_a;
      assign rd_d[s][k] = q_d;
    end
  end

  always_ff @(posedge clk) begin
    if (ar_en) begin
      sel_ar_set  <= ar_set;
    end
    if (d_en) begin
      sel_d_set  <= d_set;
      sel_d_bank <= d_bank;
    end
  end

  assign ar_data = {rd_a[sel_ar_set][1], rd_a[sel_ar_set][0]};
  assign d_rdata = rd_d[sel_d_set][sel_d_bank];

endmodule
