// rc_interconnect: operand routing network of the RC array.
//
// For every cell (r, c) it drives operand ports A and B from the source each
// port's context field selects. The sources are the three levels of the M1
// network plus the proposed diagonal link:
//   * data bus   - the cell's frame-buffer element (already widened to DW
//                  bits by rc_array)
//   * mesh       - nearest neighbours left, right, top and bottom
//   * diagonal   - the cell at the lower-left corner, (r+1, c-1); this is the
//                  proposed addition that lets a result travel up and right
//   * intra-quadrant lanes - any cell of the same row (or column) inside the
//                  same quadrant, picked by the 2-bit lane index
//   * inter-quadrant lanes - any cell of the same row (or column) in the
//                  adjacent quadrant, picked by the 2-bit lane index
// Row 0 is the top row and column 0 the leftmost column. A neighbour that
// falls outside the array reads as zero, as the diagonal FIR mapping needs
// for its bottom row. The network is purely combinational.
//
// Own choices: both ports can reach every source (the text only fixes port A
// on the data bus and port B on the neighbours); the lane index is shared
// per port through the context word; a dimension made of two quadrants is
// assumed, so "adjacent quadrant" is the other one in that direction.
module rc_interconnect
  import m1_pkg::*;
#(
  parameter int unsigned N = N_DIM,
  parameter int unsigned Q = QUAD_DIM,
  parameter int unsigned W = DW
) (
  input  logic signed [W-1:0] cell_out [N][N],  // registered cell outputs
  input  ctx_word_t           ctx      [N][N],  // context of each cell
  input  logic signed [W-1:0] bus_elem [N][N],  // data-bus element of each cell
  output logic signed [W-1:0] op_a     [N][N],
  output logic signed [W-1:0] op_b     [N][N]
);

  // Output of cell (r, c), zero outside the array.
  function automatic logic signed [W-1:0] cell_at(
      input logic signed [W-1:0] outs [N][N], input int r, input int c);
    if (r < 0 || c < 0 || r >= int'(N) || c >= int'(N)) return '0;
    return outs[r][c];
  endfunction

  function automatic logic signed [W-1:0] route(
      input logic signed [W-1:0] outs [N][N],
      input src_e sel, input logic [1:0] idx, input logic signed [W-1:0] elem,
      input int r, input int c);
    int qr0, qc0, xr0, xc0;
    qr0 = (r / int'(Q)) * int'(Q);       // first row of own quadrant
    qc0 = (c / int'(Q)) * int'(Q);       // first column of own quadrant
    xr0 = (qr0 < int'(Q)) ? qr0 + int'(Q) : qr0 - int'(Q);
    xc0 = (qc0 < int'(Q)) ? qc0 + int'(Q) : qc0 - int'(Q);
    unique case (sel)
      SRC_BUS:     return elem;
      SRC_LEFT:    return cell_at(outs, r, c - 1);
      SRC_RIGHT:   return cell_at(outs, r, c + 1);
      SRC_TOP:     return cell_at(outs, r - 1, c);
      SRC_BOTTOM:  return cell_at(outs, r + 1, c);
      SRC_DIAG_LL: return cell_at(outs, r + 1, c - 1);
      SRC_QROW:    return cell_at(outs, r, qc0 + int'(idx));
      SRC_QCOL:    return cell_at(outs, qr0 + int'(idx), c);
      SRC_XROW:    return cell_at(outs, r, xc0 + int'(idx));
      SRC_XCOL:    return cell_at(outs, xr0 + int'(idx), c);
      default:     return '0;
    endcase
  endfunction

  always_comb begin
    for (int r = 0; r < int'(N); r++) begin
      for (int c = 0; c < int'(N); c++) begin
        op_a[r][c] = route(cell_out, ctx[r][c].sel_a, ctx[r][c].idx_a, bus_elem[r][c], r, c);
        op_b[r][c] = route(cell_out, ctx[r][c].sel_b, ctx[r][c].idx_b, bus_elem[r][c], r, c);
      end
    end
  end

endmodule
