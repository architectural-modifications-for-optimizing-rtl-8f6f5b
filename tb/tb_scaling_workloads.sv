// tb_scaling_workloads: two successive scalings Out = C2 x (C1 x A) of a
// vector A of 8-bit elements, run on the full-size system for 64 and for 32
// elements, each in the two ways it can be scheduled:
//  * one step: per column, a broadcast of Out = C1 x A, then a broadcast of
//    Out(t+1) = C2 x Out(t) (the added feedback multiply), then a write-back;
//    8 + 8 + 8 = 24 array cycles for 64 elements, 12 for 32;
//  * two steps, with the plain scalar-vector multiply only: C1 x A for every
//    column and a write-back of the 16-bit products, then a wide broadcast
//    that reads those products back (both banks, 16-bit elements), C2 x them
//    and a second write-back; 32 array cycles for 64 elements, 16 for 32.
// A third schedule runs the other order of the one-step form for 64
// elements: Out = C2 x C1 from a frame-buffer word that holds C1 in every
// element, then Out(t+1) = A x Out(t) (the second added feedback multiply)
// with the vector on the bus; also 24 cycles.
// Results are stored to main memory by the DMA and compared element by
// element with C1*C2*A truncated to 16 bits; the cycle counts are checked
// and the one-step schedule must be the shorter one.
module tb_scaling_workloads;
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

  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  task automatic dma(input dma_target_e tgt, input logic st, input int maddr,
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
    @(negedge clk);
    while (!dma_cmd_ready) @(negedge clk);
  endtask

  function automatic array_cmd_t bcast(input int col, input int word, input logic set,
                                       input int addr, input logic wide);
    array_cmd_t c = '0;
    c.kind = CMD_BCAST; c.mode = MODE_COL; c.line = 3'(col); c.ctx_word = 4'(word);
    c.fb_set = set; c.fb_bank = 1'b0; c.fb_addr = 6'(addr); c.wide = wide;
    return c;
  endfunction

  function automatic array_cmd_t wback(input int col, input int addr);
    array_cmd_t c = '0;
    c.kind = CMD_WBACK; c.mode = MODE_COL; c.line = 3'(col); c.fb_set = 1'b1; c.fb_addr = 6'(addr);
    return c;
  endfunction

  array_cmd_t prog [$];

  task automatic run_prog(output longint used);
    longint c0;
    @(negedge clk);
    c0 = cycle;
    while (prog.size() > 0) begin
      arr_cmd = prog.pop_front();
      arr_cmd_valid = 1;
      @(negedge clk);
    end
    arr_cmd_valid = 0;
    used = cycle - c0;
    @(negedge clk);
  endtask

  function automatic logic [31:0] ctxw(input alu_op_e op, input src_e a, input int c);
    ctx_word_t w = '0;
    w.op = op; w.sel_a = a; w.sel_b = SRC_ZERO; w.c = 16'(c);
    return w;
  endfunction

  int c1, c2;
  int vec_a [64];

  // one step: results of column c go to set 1, address base + c
  task automatic one_step(input int cols, input int base, output longint used);
    for (int c = 0; c < cols; c++) prog.push_back(bcast(c, 0, 0, c, 0));
    for (int c = 0; c < cols; c++) prog.push_back(bcast(c, 1, 0, 0, 0));
    for (int c = 0; c < cols; c++) prog.push_back(wback(c, base + c));
    run_prog(used);
  endtask

  // two steps: intermediate products at set 1, address tmp + c
  task automatic two_steps(input int cols, input int tmp, input int base, output longint used);
    for (int c = 0; c < cols; c++) prog.push_back(bcast(c, 0, 0, c, 0));
    for (int c = 0; c < cols; c++) prog.push_back(wback(c, tmp + c));
    for (int c = 0; c < cols; c++) prog.push_back(bcast(c, 2, 1, tmp + c, 1));
    for (int c = 0; c < cols; c++) prog.push_back(wback(c, base + c));
    run_prog(used);
  endtask

  // compare the stored results of `cols` columns written at set 1, address base + c
  task automatic check_results(input int cols, input int base, input string what);
    for (int c = 0; c < cols; c++) begin
      logic [63:0] lo, hi;
      lo = {u_mem.mem[32'h400 + 2*(base + c) + 1], u_mem.mem[32'h400 + 2*(base + c)]};
      hi = {u_mem.mem[32'h600 + 2*(base + c) + 1], u_mem.mem[32'h600 + 2*(base + c)]};
      for (int r = 0; r < 8; r++)
        chk(longint'((r < 4) ? lo[r*16 +: 16] : hi[(r-4)*16 +: 16]),
            longint'(unsigned'(16'(c1 * c2 * vec_a[c*8 + r]))), what);
    end
  endtask

  initial begin
    longint t1_64, t2_64, t1_32, t2_32, t3_64;
    dma_cmd = '0; arr_cmd = '0;
    repeat (3) @(negedge clk);   // after the memory model has cleared itself
    c1 = $urandom_range(1, 7);
    c2 = -int'($urandom_range(1, 7));
    for (int i = 0; i < 64; i++) vec_a[i] = $signed(8'($urandom));
    // column contexts: word 0 C1 x A, word 1 C2 x Out(t), word 2 C2 x A,
    // word 3 A x Out(t)
    for (int s = 0; s < 8; s++) begin
      u_mem.mem[s*4 + 0] = ctxw(OP_MUL_C, SRC_BUS, c1);
      u_mem.mem[s*4 + 1] = ctxw(OP_MUL_OUT_C, SRC_ZERO, c2);
      u_mem.mem[s*4 + 2] = ctxw(OP_MUL_C, SRC_BUS, c2);
      u_mem.mem[s*4 + 3] = ctxw(OP_MUL_OUT_A, SRC_BUS, 0);
    end
    // vector A, column c's 8 elements in one 64-bit word at 0x100 + 2c
    for (int c = 0; c < 8; c++)
      for (int r = 0; r < 8; r++)
        u_mem.mem[32'h100 + 2*c + r / 4][(r % 4)*8 +: 8] = 8'(vec_a[c*8 + r]);
    // C1 in all eight elements of frame-buffer word 8
    u_mem.mem[32'h110] = {4{8'(c1)}};
    u_mem.mem[32'h111] = {4{8'(c1)}};

    rst_n = 1;
    for (int s = 0; s < 8; s++) dma(DMA_TO_CTX, 0, s*4, 0, 0, 8'h80 | (s << 4), 4);
    dma(DMA_TO_FB, 0, 32'h100, 0, 0, 0, 9);

    one_step(8, 0, t1_64);
    two_steps(8, 8, 16, t2_64);
    one_step(4, 24, t1_32);
    two_steps(4, 28, 32, t2_32);
    // constant product first, then the vector (results at address 40 + c)
    for (int c = 0; c < 8; c++) prog.push_back(bcast(c, 2, 0, 8, 0));
    for (int c = 0; c < 8; c++) prog.push_back(bcast(c, 3, 0, c, 0));
    for (int c = 0; c < 8; c++) prog.push_back(wback(c, 40 + c));
    run_prog(t3_64);

    dma(DMA_TO_FB, 1, 32'h400, 1, 0, 0, 48);   // set 1, bank A: rows 0..3
    dma(DMA_TO_FB, 1, 32'h600, 1, 1, 0, 48);   // set 1, bank B: rows 4..7
    check_results(8, 0,  "64 elements, one step");
    check_results(8, 16, "64 elements, two steps");
    check_results(4, 24, "32 elements, one step");
    check_results(4, 32, "32 elements, two steps");
    check_results(8, 40, "64 elements, C2 x C1 first");

    $display("array cycles: 64 elements %0d (one step) vs %0d (two steps); 32 elements %0d vs %0d",
             t1_64, t2_64, t1_32, t2_32);
    $display("array cycles, constant product first: %0d", t3_64);
    chk(t1_64, 24, "64 elements, one step: 8 + 8 broadcasts + 8 write-backs");
    chk(t2_64, 32, "64 elements, two steps: 2 x (8 broadcasts + 8 write-backs)");
    chk(t3_64, 24, "64 elements, C2 x C1 then A x Out(t)");
    chk(t1_32, 12, "32 elements, one step");
    chk(t2_32, 16, "32 elements, two steps");
    chk(t1_64 < t2_64 && t1_32 < t2_32, 1, "one step is faster");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
