// tb_rc_array: self-checking test of the 8x8 RC array with its network.
// The context words, data bus and line enables are driven directly.
//  1. FIR filter on the proposed diagonal link (column mode, all columns):
//     7 taps on 8x8, column j multiplies by w(6-j) and adds the value of its
//     lower-left neighbour; the bus advances 2 samples per cycle and column 6
//     rows 0 and 1 must hold two new outputs y(n) every cycle.
//  2. FIR filter on the left-neighbour mesh link (the earlier mapping):
//     the bus advances 1 sample per cycle and column 6 row r holds y(t+r-6).
//  3. Composite scaling, one column at a time: Out = C1 x A, then
//     Out = C2 x Out(t); only the enabled column may change.
//  4. Row mode with one row enabled, reading the inter-quadrant row lane.
//  5. A wide broadcast: 16-bit elements taken from all 128 bus bits.
// Expected values are computed here from the filter and scaling equations.
module tb_rc_array;
  import m1_pkg::*;

  localparam int N = 8, T = 7;
  logic clk = 0, rst_n = 0;
  bcast_mode_e mode;
  ctx_word_t ctx_words [N];
  logic [127:0] bus;
  logic wide = 0;
  logic [N-1:0] line_en;
  logic signed [15:0] cell_out [N][N];
  int checks = 0, failures = 0;
  int diag_results = 0, left_results = 0, feedback_ops = 0;

  rc_array dut (.clk, .rst_n, .mode, .ctx_words, .bus, .wide, .line_en, .cell_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [0:255];
  int w [T];

  function automatic int xs(input int n);
    return (n < 0) ? 0 : x[n];
  endfunction

  function automatic logic signed [15:0] y(input int n);
    int s = 0;
    for (int j = 0; j < T; j++) s += w[j] * xs(n - j);
    return 16'(s);
  endfunction

  task automatic chk(input logic signed [15:0] got, input logic signed [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic ctx_word_t fir_ctx(input int j, input src_e link);
    ctx_word_t c = '0;
    if (j >= T) return c;                 // spare column: NOP
    c.op    = (j == 0) ? OP_MUL_C : OP_MAC_C;
    c.sel_a = SRC_BUS;
    c.sel_b = link;
    c.c     = 16'(w[T-1-j]);
    return c;
  endfunction

  task automatic reset_array();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    for (int i = 0; i < 256; i++) x[i] = $signed(8'($urandom));
    for (int j = 0; j < T; j++) w[j] = $urandom_range(0, 14) - 7;
    mode = MODE_COL; line_en = '0; bus = '0;
    for (int i = 0; i < N; i++) ctx_words[i] = '0;
    @(negedge clk);
    rst_n = 1;

    // 1. FIR on the diagonal link
    reset_array();
    mode = MODE_COL;
    for (int j = 0; j < N; j++) ctx_words[j] = fir_ctx(j, SRC_DIAG_LL);
    line_en = '1;
    for (int k = 0; k < 24; k++) begin
      for (int r = 0; r < N; r++) bus[r*8 +: 8] = 8'(xs(2*k + r - (T-1)));
      @(negedge clk);
      chk(cell_out[0][T-1], y(2*k - (T-1)),     "diag FIR row 0");
      chk(cell_out[1][T-1], y(2*k - (T-1) + 1), "diag FIR row 1");
      diag_results += 2;
      chk(cell_out[0][N-1], 16'sd0, "spare column idle");
    end
    line_en = '0;

    // 2. FIR on the left-neighbour link
    reset_array();
    for (int j = 0; j < N; j++) ctx_words[j] = fir_ctx(j, SRC_LEFT);
    line_en = '1;
    for (int k = 0; k < 24; k++) begin
      for (int r = 0; r < N; r++) bus[r*8 +: 8] = 8'(xs(k + r - (T-1)));
      @(negedge clk);
      // the chain is full once T-1 cycles have passed
      if (k >= T - 1) begin
        for (int r = 0; r < N; r++) chk(cell_out[r][T-1], y(k + r - (T-1)), "left FIR");
        left_results++;
      end
    end
    line_en = '0;

    // 3. composite scaling: C1 x A, then C2 x Out(t), column by column
    reset_array();
    begin
      int c1, c2;
      c1 = 3; c2 = -5;
      for (int col = 0; col < N; col++) begin
        ctx_words[col] = '0;
        ctx_words[col].op = OP_MUL_C; ctx_words[col].sel_a = SRC_BUS; ctx_words[col].c = 16'(c1);
      end
      for (int col = 0; col < N; col++) begin
        for (int r = 0; r < N; r++) bus[r*8 +: 8] = 8'(x[col*8 + r]);
        line_en = N'(1) << col;
        @(negedge clk);
      end
      for (int col = 0; col < N; col++) begin
        ctx_words[col].op = OP_MUL_OUT_C; ctx_words[col].c = 16'(c2);
      end
      bus = '1;   // ignored by the feedback operation
      for (int col = 0; col < N; col++) begin
        line_en = N'(1) << col;
        @(negedge clk);
        feedback_ops++;
        // columns not yet scaled by C2 must still hold C1 x A
        if (col < N - 1) chk(cell_out[0][col+1], 16'(c1 * x[(col+1)*8]), "column isolation");
      end
      line_en = '0;
      for (int col = 0; col < N; col++)
        for (int r = 0; r < N; r++)
          chk(cell_out[r][col], 16'(c1 * c2 * x[col*8 + r]), "composite scaling");
    end

    // 4. row mode: row 5 copies the inter-quadrant row lane, lane 2
    begin
      logic signed [15:0] prev_out [N][N];
      prev_out = cell_out;
      mode = MODE_ROW;
      for (int r = 0; r < N; r++) begin
        ctx_words[r] = '0;
        ctx_words[r].op = OP_PASS_A; ctx_words[r].sel_a = SRC_XROW; ctx_words[r].idx_a = 2'd2;
      end
      line_en = 8'b0010_0000;
      @(negedge clk);
      line_en = '0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          chk(cell_out[r][c], (r == 5) ? prev_out[5][(c < 4) ? 6 : 2] : prev_out[r][c], "row mode lane");
    end

    // 5. wide broadcast into column 3: cell (r, 3) takes bits r*16 +: 16
    begin
      logic signed [15:0] prev_out [N][N];
      prev_out = cell_out;
      mode = MODE_COL;
      for (int c = 0; c < N; c++) begin
        ctx_words[c] = '0;
        ctx_words[c].op = OP_PASS_A; ctx_words[c].sel_a = SRC_BUS;
      end
      bus = {$urandom, $urandom, $urandom, $urandom};
      wide = 1;
      line_en = 8'b0000_1000;
      @(negedge clk);
      line_en = '0; wide = 0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          chk(cell_out[r][c], (c == 3) ? bus[r*16 +: 16] : prev_out[r][c], "wide broadcast");
    end

    checks++;
    if (diag_results == 0 || left_results == 0 || feedback_ops == 0) begin
      failures++; $display("FAIL a mapping was not exercised");
    end
    $display("results: diagonal FIR %0d, left FIR %0d cycles, feedback ops %0d",
             diag_results, left_results, feedback_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
