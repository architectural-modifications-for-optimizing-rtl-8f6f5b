// rc_cell: one reconfigurable cell (RC) of the M1 array.
//
// The cell holds one registered output word. When `en` is high at a rising
// clock edge it computes a new output from operand port A, operand port B,
// the constant field of its context word and its own current output, as
// chosen by the context word's opcode. When `en` is low, or the opcode is
// OP_NOP, the output holds. The operands themselves are selected outside the
// cell, by rc_interconnect.
//
// Following the proposed ALU enhancement, the multiplier is available in
// every cell and can take the cell's own output as an operand, so that
// Out(t+1) = C x Out(t) and Out(t+1) = A x Out(t) are single operations.
// The multiply-add A x C + B is the tap operation of the FIR mappings.
//
// Own choices: arithmetic is two's complement on DW bits and wraps (only
// the low DW bits of a product are kept); reset clears the output.
// Timing: one operation per enabled cycle, result visible after the edge.
module rc_cell
  import m1_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,     // execute this cycle
  input  ctx_word_t           ctx,    // context word of this cell's row/column
  input  logic signed [W-1:0] a,      // operand port A
  input  logic signed [W-1:0] b,      // operand port B
  output logic signed [W-1:0] out     // registered output
);

  logic signed [W-1:0] c_ext;
  logic signed [W-1:0] result;

  assign c_ext = W'(ctx.c);

  always_comb begin
    unique case (ctx.op)
      OP_PASS_A:    result = a;
      OP_ADD:       result = a + b;
      OP_MUL_C:     result = W'(a * c_ext);
      OP_MAC_C:     result = W'(a * c_ext) + b;
      OP_MUL_AB:    result = W'(a * b);
      OP_MUL_OUT_C: result = W'(c_ext * out);
      OP_MUL_OUT_A: result = W'(a * out);
      default:      result = out;   // OP_NOP and unused codes hold
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out <= '0;
    else if (en) out <= result;
  end

endmodule
