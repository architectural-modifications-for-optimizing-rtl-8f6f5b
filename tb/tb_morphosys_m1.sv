// tb_morphosys_m1: end-to-end test of the whole array system at its default
// size (8x8 array, 2x8x16x32 context memory, 2x2x64x64 frame buffer).
// Everything enters through main memory and leaves through it again:
//  1. DMA loads context words for four column-mode programs and one row-mode
//     program, and the 64-element vector A into frame-buffer set 0, bank A.
//  2. Composite scaling in one step: 8 column broadcasts of Out = C1 x A,
//     8 column broadcasts of Out(t+1) = C2 x Out(t) (the proposed feedback
//     multiply), 8 write-backs into set 1; the 24 instructions must run in
//     24 consecutive cycles. Meanwhile the DMA loads the FIR samples into
//     set 0, bank B (loading while the array runs).
//  3. 7-tap FIR on the proposed diagonal link: alternate one all-column
//     broadcast and one write-back of column 6, giving two outputs every two
//     cycles; the rate is checked from the cycle count.
//  4. A row-mode broadcast into one row, read back through the probe port.
//  5. DMA stores the results to main memory, where they are compared with
//     values computed here from the scaling and FIR equations.
// Every mechanism above is counted, and one that never happened is a failure.
module tb_morphosys_m1;
  import m1_pkg::*;

  logic clk = 0, rst_n = 0;
  logic dma_cmd_valid = 0, dma_cmd_ready, dma_done;
  dma_cmd_t dma_cmd;
  logic arr_cmd_valid = 0;
  array_cmd_t arr_cmd;
  logic [2:0] probe_row = 0, probe_col = 0;
  logic [15:0] probe_data;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [23:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;

  morphosys_m1 dut (.*);
  main_memory_model #(.WORDS(4096)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int dones = 0;
  // mechanism counters
  int n_ctx_load = 0, n_fb_load = 0, n_fb_store = 0, n_bcast_one = 0, n_bcast_all = 0;
  int n_feedback = 0, n_diag_fir = 0, n_wback = 0, n_overlap = 0, n_row_mode = 0;

  always @(posedge clk) begin
    cycle++;
    if (dma_done) dones++;
    if (!dma_cmd_ready && arr_cmd_valid) n_overlap++;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic longint u16(input logic [15:0] v);
    return longint'(v);
  endfunction

  // ---------------------------------------------------------------- DMA
  task automatic dma_start(input dma_target_e tgt, input logic st, input int maddr,
                           input logic set, input logic bank, input int laddr, input int cnt);
    @(negedge clk);
    while (!dma_cmd_ready) @(negedge clk);
    dma_cmd = '0;
    dma_cmd.target = tgt; dma_cmd.store = st; dma_cmd.mem_addr = 24'(maddr);
    dma_cmd.fb_set = set; dma_cmd.fb_bank = bank; dma_cmd.local_addr = 8'(laddr);
    dma_cmd.count = 8'(cnt);
    dma_cmd_valid = 1;
    @(negedge clk);
    dma_cmd_valid = 0;
    if (tgt == DMA_TO_CTX) n_ctx_load++;
    else if (st) n_fb_store++;
    else n_fb_load++;
  endtask

  task automatic dma_wait();
    @(negedge clk);
    while (!dma_cmd_ready) @(negedge clk);
  endtask

  task automatic dma(input dma_target_e tgt, input logic st, input int maddr,
                     input logic set, input logic bank, input int laddr, input int cnt);
    dma_start(tgt, st, maddr, set, bank, laddr, cnt);
    dma_wait();
  endtask

  // ------------------------------------------------------ array commands
  function automatic array_cmd_t bcast(input bcast_mode_e m, input logic all, input int line,
                                       input int word, input logic set, input logic bank,
                                       input int addr);
    array_cmd_t c = '0;
    c.kind = CMD_BCAST; c.mode = m; c.all = all; c.line = 3'(line); c.ctx_word = 4'(word);
    c.fb_set = set; c.fb_bank = bank; c.fb_addr = 6'(addr);
    return c;
  endfunction

  function automatic array_cmd_t wback(input bcast_mode_e m, input int line, input logic set,
                                       input int addr);
    array_cmd_t c = '0;
    c.kind = CMD_WBACK; c.mode = m; c.line = 3'(line); c.fb_set = set; c.fb_addr = 6'(addr);
    return c;
  endfunction

  array_cmd_t prog [$];

  // Issue the queued commands on consecutive cycles; return the cycles used.
  task automatic run_prog(output longint used);
    longint c0;
    @(negedge clk);
    c0 = cycle;
    while (prog.size() > 0) begin
      arr_cmd = prog.pop_front();
      arr_cmd_valid = 1;
      if (arr_cmd.kind == CMD_WBACK) n_wback++;
      if (arr_cmd.kind == CMD_BCAST) begin
        if (arr_cmd.all) n_bcast_all++; else n_bcast_one++;
      end
      @(negedge clk);
    end
    arr_cmd_valid = 0;
    used = cycle - c0;
    @(negedge clk);   // let the last command leave the pipeline
  endtask

  // ------------------------------------------------------------- contexts
  function automatic logic [31:0] ctxw(input alu_op_e op, input src_e a, input src_e b,
                                       input int c);
    ctx_word_t w = '0;
    w.op = op; w.sel_a = a; w.sel_b = b; w.c = 16'(c);
    return w;
  endfunction

  localparam int T = 7;
  localparam int K = 24;           // FIR bus words
  int c1, c2;
  int vec_a [64];
  int x [0:127];
  int wt [T];

  function automatic int xs(input int n);
    return (n < 0) ? 0 : x[n];
  endfunction

  function automatic logic [15:0] y(input int n);
    int s = 0;
    for (int j = 0; j < T; j++) s += wt[j] * xs(n - j);
    return 16'(s);
  endfunction

  function automatic logic [63:0] pack8(input int e [8]);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[i*8 +: 8] = 8'(e[i]);
    return v;
  endfunction

  task automatic put64(input int maddr, input logic [63:0] v);
    u_mem.mem[maddr]     = v[31:0];
    u_mem.mem[maddr + 1] = v[63:32];
  endtask

  function automatic logic [63:0] get64(input int maddr);
    return {u_mem.mem[maddr + 1], u_mem.mem[maddr]};
  endfunction

  initial begin
    longint used;
    int e [8];
    dma_cmd = '0; arr_cmd = '0;
    c1 = 3; c2 = -2;
    for (int i = 0; i < 64; i++) vec_a[i] = $signed(8'($urandom));
    for (int i = 0; i < 128; i++) x[i] = $signed(8'($urandom));
    for (int j = 0; j < T; j++) wt[j] = $urandom_range(0, 16) - 8;

    // ---- main-memory image
    // column contexts, set s = column s: word 0 C1 x A, word 1 C2 x Out(t),
    // word 2 FIR tap on the diagonal link, word 3 clear to zero
    for (int s = 0; s < 8; s++) begin
      u_mem.mem[s*4 + 0] = ctxw(OP_MUL_C, SRC_BUS, SRC_ZERO, c1);
      u_mem.mem[s*4 + 1] = ctxw(OP_MUL_OUT_C, SRC_ZERO, SRC_ZERO, c2);
      u_mem.mem[s*4 + 2] = (s >= T) ? 32'h0 :
                           ctxw(s == 0 ? OP_MUL_C : OP_MAC_C, SRC_BUS, SRC_DIAG_LL, wt[T-1-s]);
      u_mem.mem[s*4 + 3] = ctxw(OP_PASS_A, SRC_ZERO, SRC_ZERO, 0);   // clear
    end
    // row context, row 2, word 0: Out = A + B with B from the right neighbour
    u_mem.mem[32'h40] = ctxw(OP_ADD, SRC_BUS, SRC_RIGHT, 0);
    // vector A, column c's 8 elements at 0x100 + 2c
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) e[r] = vec_a[c*8 + r];
      put64(32'h100 + 2*c, pack8(e));
    end
    // FIR bus words: word k holds x(2k + r - 6) for r = 0..7
    for (int k = 0; k < K; k++) begin
      for (int r = 0; r < 8; r++) e[r] = xs(2*k + r - (T-1));
      put64(32'h200 + 2*k, pack8(e));
    end
    // row-mode bus word
    for (int r = 0; r < 8; r++) e[r] = 10 * r + 1;
    put64(32'h300, pack8(e));

    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. loads
    for (int s = 0; s < 8; s++) dma(DMA_TO_CTX, 0, s*4, 0, 0, 8'h80 | (s << 4), 4);
    dma(DMA_TO_CTX, 0, 32'h40, 0, 0, 8'h20, 1);
    for (int c = 0; c < 8; c++) dma(DMA_TO_FB, 0, 32'h100 + 2*c, 0, 0, 8*c, 1);
    dma(DMA_TO_FB, 0, 32'h300, 0, 0, 1, 1);

    // ---- 2. composite scaling, with the FIR samples loading meanwhile
    dma_start(DMA_TO_FB, 0, 32'h200, 0, 1, 0, K);
    for (int c = 0; c < 8; c++) prog.push_back(bcast(MODE_COL, 0, c, 0, 0, 0, 8*c));
    for (int c = 0; c < 8; c++) prog.push_back(bcast(MODE_COL, 0, c, 1, 0, 0, 0));
    for (int c = 0; c < 8; c++) prog.push_back(wback(MODE_COL, c, 1, 8*c));
    run_prog(used);
    n_feedback += 8;
    chk(used, 24, "composite scaling cycles (8 sbc + 8 sbc + 8 wfbi)");
    // the 16-bit read-back path
    for (int r = 0; r < 8; r++) begin
      probe_row = 3'(r); probe_col = 3'(r ^ 5);
      #1 chk(longint'($signed(probe_data)), longint'($signed(16'(c1 * c2 * vec_a[(r ^ 5)*8 + r]))),
             "probe read-back");
    end
    dma_wait();

    // ---- 3. FIR on the diagonal link: clear the array (all cells 0, as at
    // the start of the mapping), then broadcast, write-back, ...
    prog.push_back(bcast(MODE_COL, 1, 0, 3, 0, 0, 0));
    run_prog(used);
    for (int k = 0; k < K; k++) begin
      prog.push_back(bcast(MODE_COL, 1, 0, 2, 0, 1, k));
      prog.push_back(wback(MODE_COL, T - 1, 0, 32 + k));
    end
    run_prog(used);
    n_diag_fir += 2 * K;
    chk(used, 2 * K, "FIR: two outputs every two cycles");

    // ---- 4. row mode: row 2 gets A + right neighbour
    begin
      logic signed [15:0] right_before [8];
      for (int c = 0; c < 8; c++) begin
        probe_row = 3'd2; probe_col = 3'(c + 1); #1;
        right_before[c] = (c == 7) ? 16'sd0 : probe_data;
      end
      prog.push_back(bcast(MODE_ROW, 0, 2, 0, 0, 0, 1));
      run_prog(used);
      n_row_mode++;
      for (int c = 0; c < 8; c++) begin
        probe_row = 3'd2; probe_col = 3'(c); #1;
        chk(longint'($signed(probe_data)), longint'($signed(16'(10 * c + 1 + right_before[c]))),
            "row-mode broadcast");
      end
    end

    // ---- 5. store and compare
    dma(DMA_TO_FB, 1, 32'h400, 1, 0, 0, 64);    // set 1 bank A
    dma(DMA_TO_FB, 1, 32'h500, 1, 1, 0, 64);    // set 1 bank B
    dma(DMA_TO_FB, 1, 32'h600, 0, 0, 32, K);    // set 0 bank A, FIR outputs
    for (int c = 0; c < 8; c++) begin
      logic [63:0] lo, hi;
      lo = get64(32'h400 + 2 * 8 * c);
      hi = get64(32'h500 + 2 * 8 * c);
      for (int r = 0; r < 8; r++)
        chk(u16((r < 4) ? lo[r*16 +: 16] : hi[(r-4)*16 +: 16]), u16(16'(c1 * c2 * vec_a[c*8 + r])),
            "composite scaling result");
    end
    for (int k = 0; k < K; k++) begin
      logic [63:0] lo;
      lo = get64(32'h600 + 2 * k);
      chk(u16(lo[15:0]),  u16(y(2*k - (T-1))),     "FIR output, row 0");
      chk(u16(lo[31:16]), u16(y(2*k - (T-1) + 1)), "FIR output, row 1");
    end

    // ---- mechanism coverage
    $display("ctx loads %0d, fb loads %0d, fb stores %0d, single-line broadcasts %0d,",
             n_ctx_load, n_fb_load, n_fb_store, n_bcast_one);
    $display("all-line broadcasts %0d, feedback multiplies %0d, diagonal FIR outputs %0d,",
             n_bcast_all, n_feedback, n_diag_fir);
    $display("write-backs %0d, array cycles overlapping a DMA transfer %0d, row-mode broadcasts %0d",
             n_wback, n_overlap, n_row_mode);
    chk(n_ctx_load > 0, 1, "context load happened");
    chk(n_fb_load > 0, 1, "frame-buffer load happened");
    chk(n_fb_store > 0, 1, "frame-buffer store happened");
    chk(n_bcast_one > 0, 1, "single-line broadcast happened");
    chk(n_bcast_all > 0, 1, "all-line broadcast happened");
    chk(n_feedback > 0, 1, "feedback multiply happened");
    chk(n_diag_fir > 0, 1, "diagonal FIR happened");
    chk(n_wback > 0, 1, "write-back happened");
    chk(n_overlap > 0, 1, "DMA overlapped array execution");
    chk(n_row_mode > 0, 1, "row-mode broadcast happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
