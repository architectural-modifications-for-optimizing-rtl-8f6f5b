// tb_fir_mappings: the two 3-tap FIR schedules at their own array sizes.
//  * Diagonal mapping on a 4 x 4 array: columns 0..2 hold w2, w1, w0, the
//    spare column 3 idles; every cycle all rows get the next 4 samples with
//    the window moving by 2. Cells (0,2) and (1,2) must hold y(2t-4) and
//    y(2t-3) after cycle t, and every intermediate cell must hold the partial
//    sum of its schedule: cell (r,1) = x(s)w1 + x(s-1)w2 with s = 2t-4+r,
//    for the rows that have a lower-left neighbour.
//  * Left-neighbour mapping on a 3 x 3 array: window moving by 1, cell
//    (r,2) must hold y(t-2+r).
// The outputs produced per cycle are counted: the diagonal schedule must
// yield two new outputs per cycle, the left-neighbour schedule one.
module tb_fir_mappings;
  import m1_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int new_diag = 0, new_left = 0, cyc_diag = 0, cyc_left = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 4 x 4 array, diagonal mapping
  bcast_mode_e m4 = MODE_COL;
  ctx_word_t   ctx4 [4];
  logic [63:0] bus4;
  logic [3:0]  en4 = '0;
  logic signed [15:0] out4 [4][4];
  rc_array #(.N(4)) u_diag (.clk, .rst_n, .mode(m4), .ctx_words(ctx4), .bus(bus4), .wide(1'b0),
                            .line_en(en4), .cell_out(out4));

  // 3 x 3 array, left-neighbour mapping
  bcast_mode_e m3 = MODE_COL;
  ctx_word_t   ctx3 [3];
  logic [47:0] bus3;
  logic [2:0]  en3 = '0;
  logic signed [15:0] out3 [3][3];
  rc_array #(.N(3)) u_left (.clk, .rst_n, .mode(m3), .ctx_words(ctx3), .bus(bus3), .wide(1'b0),
                            .line_en(en3), .cell_out(out3));

  int x [0:63];
  int w [3];

  function automatic int xs(input int n);
    return (n < 0) ? 0 : x[n];
  endfunction

  function automatic logic signed [15:0] y(input int n);
    return 16'(w[0] * xs(n) + w[1] * xs(n - 1) + w[2] * xs(n - 2));
  endfunction

  task automatic chk(input logic signed [15:0] got, input logic signed [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic ctx_word_t tap(input int j, input src_e link);
    ctx_word_t c = '0;
    if (j > 2) return c;
    c.op = (j == 0) ? OP_MUL_C : OP_MAC_C;
    c.sel_a = SRC_BUS; c.sel_b = link; c.c = 16'(w[2 - j]);
    return c;
  endfunction

  initial begin
    logic signed [15:0] last_out [2];
    for (int i = 0; i < 64; i++) x[i] = $urandom_range(0, 40) - 20;
    for (int j = 0; j < 3; j++) w[j] = $urandom_range(1, 9);
    for (int j = 0; j < 4; j++) ctx4[j] = tap(j, SRC_DIAG_LL);
    for (int j = 0; j < 3; j++) ctx3[j] = tap(j, SRC_LEFT);
    bus4 = '0; bus3 = '0;
    @(negedge clk);
    rst_n = 1;

    // diagonal mapping: cycle t = 1, 2, ... (cycle 0 is the reset state)
    en4 = '1;
    for (int t = 1; t <= 20; t++) begin
      for (int r = 0; r < 4; r++) bus4[r*8 +: 8] = 8'(xs(2*t - 4 + r));
      @(negedge clk);
      cyc_diag++;
      chk(out4[0][2], y(2*t - 4), "diagonal y row 0");
      chk(out4[1][2], y(2*t - 3), "diagonal y row 1");
      for (int r = 0; r < 3; r++)
        chk(out4[r][1], 16'(xs(2*t - 4 + r) * w[1] + xs(2*t - 5 + r) * w[2]), "diagonal partial sum");
      chk(out4[3][1], 16'(xs(2*t - 1) * w[1]), "bottom row adds zero");
      chk(out4[0][3], 16'sd0, "spare column");
      if (2*t - 4 >= 0 && out4[0][2] !== last_out[0]) new_diag++;
      if (2*t - 3 >= 0 && out4[1][2] !== last_out[1]) new_diag++;
      last_out[0] = out4[0][2]; last_out[1] = out4[1][2];
    end
    en4 = '0;

    // left-neighbour mapping
    en3 = '1;
    for (int t = 1; t <= 20; t++) begin
      for (int r = 0; r < 3; r++) bus3[r*8 +: 8] = 8'(xs(t - 2 + r));
      @(negedge clk);
      cyc_left++;
      if (t >= 3) begin
        for (int r = 0; r < 3; r++) chk(out3[r][2], y(t - 2 + r), "left-neighbour y");
        new_left++;   // only the bottom row's output is new: y(t) appeared nowhere before
      end
    end
    en3 = '0;

    $display("diagonal mapping: %0d new outputs in %0d cycles; left mapping: %0d in %0d",
             new_diag, cyc_diag, new_left, cyc_left);
    // steady state: 2 per cycle on the diagonal, 1 per cycle on the left link
    checks++;
    if (new_diag < 2 * (cyc_diag - 2)) begin failures++; $display("FAIL diagonal rate"); end
    checks++;
    if (new_left != cyc_left - 2) begin failures++; $display("FAIL left rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
