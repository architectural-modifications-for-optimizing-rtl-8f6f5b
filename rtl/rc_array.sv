// rc_array: the N x N array of reconfigurable cells with its interconnect.
//
// Context words are broadcast the M1 way: in column mode every cell of
// column c takes context word c and the element of the frame-buffer data bus
// that belongs to its row r; in row mode every cell of row r takes context
// word r and the element of its column c. So all cells of a row (or column)
// perform the same function with the same connection scheme.
// The 128-bit bus carries the words of banks A (low) and B (high). Element
// i is byte i of bits 63:0, sign-extended, in a single-bank broadcast, and
// the 16-bit field i of all 128 bits in a wide (two-bank) broadcast, which
// is the layout a write-back stores, so results can be broadcast again.
// `line_en` marks which rows (row mode) or columns (column mode) execute in
// this cycle; all other cells hold their outputs.
//
// The 8 x 8 size with four 4 x 4 quadrants follows the M1 block diagram.
// Timing: context, bus and enables are sampled at the rising edge that
// updates the outputs; `cell_out` is registered.
module rc_array
  import m1_pkg::*;
#(
  parameter int unsigned N = N_DIM,
  parameter int unsigned Q = QUAD_DIM,
  parameter int unsigned W = DW,
  parameter int unsigned E = EW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  bcast_mode_e         mode,
  input  ctx_word_t           ctx_words [N],  // one word per row/column
  input  logic    [2*N*E-1:0] bus,            // frame-buffer data bus {B, A}
  input  logic                wide,           // 16-bit elements from both banks
  input  logic        [N-1:0] line_en,        // active rows/columns
  output logic signed [W-1:0] cell_out  [N][N]
);

  ctx_word_t           cell_ctx  [N][N];
  logic signed [W-1:0] bus_elem  [N][N];
  logic signed [W-1:0] elem      [N];         // element i of the bus
  logic signed [W-1:0] op_a      [N][N];
  logic signed [W-1:0] op_b      [N][N];
  logic                cell_en   [N][N];

  // Bus elements: 8-bit sign-extended (one bank) or 16-bit (both banks).
  always_comb begin
    for (int i = 0; i < int'(N); i++)
      elem[i] = wide ? W'(signed'(bus[i*2*E +: 2*E])) : W'(signed'(bus[i*E +: E]));
  end

  // Context broadcast: distribute words, bus elements and enables.
  always_comb begin
    for (int r = 0; r < int'(N); r++) begin
      for (int c = 0; c < int'(N); c++) begin
        if (mode == MODE_COL) begin
          cell_ctx[r][c] = ctx_words[c];
          bus_elem[r][c] = elem[r];
          cell_en[r][c]  = line_en[c];
        end else begin
          cell_ctx[r][c] = ctx_words[r];
          bus_elem[r][c] = elem[c];
          cell_en[r][c]  = line_en[r];
        end
      end
    end
  end

  rc_interconnect #(.N(N), .Q(Q), .W(W)) u_net (
    .cell_out (cell_out),
    .ctx      (cell_ctx),
    .bus_elem (bus_elem),
    .op_a     (op_a),
    .op_b     (op_b)
  );

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      rc_cell #(.W(W)) u_rc (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (cell_en[r][c]),
        .ctx   (cell_ctx[r][c]),
        .a     (op_a[r][c]),
        .b     (op_b[r][c]),
        .out   (cell_out[r][c])
      );
    end
  end

endmodule
