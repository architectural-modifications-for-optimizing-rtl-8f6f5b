// tb_rc_interconnect: self-checking test of the operand routing network.
// Fills every cell output with a value that encodes its coordinates, then
// for random source selections and lane indices checks each cell's port A
// and port B against coordinates worked out here (quadrant = bit 2 of the
// index, lane = bits 1:0), with zero outside the array. It also checks the
// proposed diagonal explicitly: cell (r, c) must see cell (r+1, c-1).
module tb_rc_interconnect;
  import m1_pkg::*;

  localparam int N = 8;
  logic signed [15:0] cell_out [N][N];
  ctx_word_t          ctx      [N][N];
  logic signed [15:0] bus_elem [N][N];
  logic signed [15:0] op_a     [N][N];
  logic signed [15:0] op_b     [N][N];
  int checks = 0, failures = 0;
  int diag_seen = 0;

  rc_interconnect dut (.cell_out, .ctx, .bus_elem, .op_a, .op_b);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] val(input int r, input int c);
    if (r < 0 || r > 7 || c < 0 || c > 7) return 16'sd0;
    return 16'(16'h1000 + r * 16 + c);
  endfunction

  function automatic logic signed [15:0] expect_src(input int s, input int idx, input int r,
                                                    input int c, input logic [15:0] e);
    int own_qc, own_qr, oth_qc, oth_qr;
    own_qc = c & 4;  own_qr = r & 4;
    oth_qc = 4 - own_qc; oth_qr = 4 - own_qr;
    case (s)
      0:  return e;
      1:  return val(r, c - 1);
      2:  return val(r, c + 1);
      3:  return val(r - 1, c);
      4:  return val(r + 1, c);
      5:  return val(r + 1, c - 1);
      6:  return val(r, own_qc + idx);
      7:  return val(own_qr + idx, c);
      8:  return val(r, oth_qc + idx);
      9:  return val(oth_qr + idx, c);
      default: return 16'sd0;
    endcase
  endfunction

  initial begin
    int sa [N][N], sb [N][N], ia [N][N], ib [N][N];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) cell_out[r][c] = val(r, c);
    for (int t = 0; t < 200; t++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          sa[r][c] = (t < 16) ? t : $urandom_range(0, 15);
          sb[r][c] = (t < 16) ? 15 - t : $urandom_range(0, 15);
          ia[r][c] = $urandom_range(0, 3);
          ib[r][c] = $urandom_range(0, 3);
          ctx[r][c] = '0;
          ctx[r][c].sel_a = src_e'(sa[r][c]);
          ctx[r][c].sel_b = src_e'(sb[r][c]);
          ctx[r][c].idx_a = 2'(ia[r][c]);
          ctx[r][c].idx_b = 2'(ib[r][c]);
          bus_elem[r][c] = 16'($urandom);
        end
      #1;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          logic signed [15:0] ea, eb;
          ea = expect_src(sa[r][c], ia[r][c], r, c, bus_elem[r][c]);
          eb = expect_src(sb[r][c], ib[r][c], r, c, bus_elem[r][c]);
          checks += 2;
          if (op_a[r][c] !== ea) begin
            failures++;
            if (failures < 10) $display("FAIL A (%0d,%0d) sel=%0d idx=%0d got %h exp %h",
                                        r, c, sa[r][c], ia[r][c], op_a[r][c], ea);
          end
          if (op_b[r][c] !== eb) begin
            failures++;
            if (failures < 10) $display("FAIL B (%0d,%0d) sel=%0d idx=%0d got %h exp %h",
                                        r, c, sb[r][c], ib[r][c], op_b[r][c], eb);
          end
          if (sb[r][c] == 5 && r < 7 && c > 0 && op_b[r][c] === cell_out[r+1][c-1]) diag_seen++;
        end
    end
    checks++;
    if (diag_seen == 0) begin
      failures++;
      $display("FAIL diagonal link never exercised");
    end
    $display("diagonal port-B reads checked: %0d", diag_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
