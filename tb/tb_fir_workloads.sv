// tb_fir_workloads: the FIR filter throughput comparison, run on the
// full-size system with write-back included.
//  * Basic mapping, 8 taps on the 8 x 8 array: column j multiplies by
//    w(7-j) and adds the output of its left neighbour; the sample window
//    moves by one per broadcast, so after 8 broadcasts column 7 holds 8 new
//    outputs y(n) ... y(n+7) (row r holds y(n+r)), which one write-back
//    stores. 32 outputs take 4 x (8 + 1) = 36 cycles: 8 outputs per 9 cycles.
//  * Diagonal mapping, 7 taps (the most an 8 x 8 array holds): column j
//    multiplies by w(6-j) and adds the output of its lower-left neighbour;
//    the window moves by two per broadcast and rows 0 and 1 of column 6 hold
//    two new outputs, stored by a write-back after every broadcast. 32
//    outputs take 32 cycles: 2 outputs per 2 cycles.
// Both runs start from a cleared array. The outputs are stored to main
// memory and compared with the filter equation; the cycle counts are
// checked and printed as samples per second at a 100 MHz clock.
module tb_fir_workloads;
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

  // all-column broadcast of context word `word`, bus from set 0
  function automatic array_cmd_t bcast(input int word, input logic bank, input int addr);
    array_cmd_t c = '0;
    c.kind = CMD_BCAST; c.mode = MODE_COL; c.all = 1'b1; c.ctx_word = 4'(word);
    c.fb_set = 1'b0; c.fb_bank = bank; c.fb_addr = 6'(addr);
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

  function automatic logic [31:0] ctxw(input alu_op_e op, input src_e b, input int c);
    ctx_word_t w = '0;
    w.op = op; w.sel_a = (op == OP_PASS_A) ? SRC_ZERO : SRC_BUS; w.sel_b = b; w.c = 16'(c);
    return w;
  endfunction

  localparam int TB = 8;     // taps, basic mapping
  localparam int TD = 7;     // taps, diagonal mapping
  localparam int KB = 32;    // broadcasts, basic mapping
  localparam int KD = 16;    // broadcasts, diagonal mapping
  int x [0:63];
  int wb [TB];
  int wd [TD];

  function automatic int xs(input int n);
    return (n < 0) ? 0 : x[n];
  endfunction

  function automatic longint yb(input int n);
    int s = 0;
    for (int j = 0; j < TB; j++) s += wb[j] * xs(n - j);
    return longint'(unsigned'(16'(s)));
  endfunction

  function automatic longint yd(input int n);
    int s = 0;
    for (int j = 0; j < TD; j++) s += wd[j] * xs(n - j);
    return longint'(unsigned'(16'(s)));
  endfunction

  function automatic longint field(input int maddr, input int k);
    logic [63:0] v;
    v = {u_mem.mem[maddr + 1], u_mem.mem[maddr]};
    return longint'(v[k*16 +: 16]);
  endfunction

  initial begin
    longint t_basic, t_diag;
    dma_cmd = '0; arr_cmd = '0;
    repeat (3) @(negedge clk);   // after the memory model has cleared itself
    for (int i = 0; i < 64; i++) x[i] = $signed(8'($urandom));
    for (int j = 0; j < TB; j++) wb[j] = $urandom_range(0, 16) - 8;
    for (int j = 0; j < TD; j++) wd[j] = $urandom_range(0, 16) - 8;
    // column contexts: word 0 basic tap, word 1 diagonal tap, word 2 clear
    for (int s = 0; s < 8; s++) begin
      u_mem.mem[s*4 + 0] = ctxw(s == 0 ? OP_MUL_C : OP_MAC_C, SRC_LEFT, wb[TB-1-s]);
      u_mem.mem[s*4 + 1] = (s >= TD) ? 32'h0 :
                           ctxw(s == 0 ? OP_MUL_C : OP_MAC_C, SRC_DIAG_LL, wd[TD-1-s]);
      u_mem.mem[s*4 + 2] = ctxw(OP_PASS_A, SRC_ZERO, 0);
    end
    // bus words: basic word k row r = x(k - 7 + r) (bank A), diagonal word
    // k row r = x(2k - 6 + r) (bank B)
    for (int k = 0; k < KB; k++)
      for (int r = 0; r < 8; r++) begin
        u_mem.mem[32'h100 + 2*k + r / 4][(r % 4)*8 +: 8] = 8'(xs(k - (TB-1) + r));
        if (k < KD) u_mem.mem[32'h200 + 2*k + r / 4][(r % 4)*8 +: 8] = 8'(xs(2*k - (TD-1) + r));
      end

    rst_n = 1;
    for (int s = 0; s < 8; s++) dma(DMA_TO_CTX, 0, s*4, 0, 0, 8'h80 | (s << 4), 3);
    dma(DMA_TO_FB, 0, 32'h100, 0, 0, 0, KB);
    dma(DMA_TO_FB, 0, 32'h200, 0, 1, 0, KD);

    // basic mapping: 8 broadcasts, one write-back of column 7
    prog.push_back(bcast(2, 0, 0));
    run_prog(t_basic);
    for (int m = 0; m < KB / 8; m++) begin
      for (int i = 0; i < 8; i++) prog.push_back(bcast(0, 0, 8*m + i));
      prog.push_back(wback(TB - 1, m));
    end
    run_prog(t_basic);

    // diagonal mapping: broadcast, write-back of column 6, ...
    prog.push_back(bcast(2, 0, 0));
    run_prog(t_diag);
    for (int k = 0; k < KD; k++) begin
      prog.push_back(bcast(1, 1, k));
      prog.push_back(wback(TD - 1, 16 + k));
    end
    run_prog(t_diag);

    dma(DMA_TO_FB, 1, 32'h400, 1, 0, 0, 32);   // set 1, bank A
    dma(DMA_TO_FB, 1, 32'h500, 1, 1, 0, 4);    // set 1, bank B
    for (int m = 0; m < KB / 8; m++)
      for (int r = 0; r < 8; r++)
        chk((r < 4) ? field(32'h400 + 2*m, r) : field(32'h500 + 2*m, r - 4), yb(8*m + r),
            "basic mapping output");
    for (int k = 0; k < KD; k++) begin
      chk(field(32'h400 + 2*(16 + k), 0), yd(2*k - (TD-1)),     "diagonal mapping output, row 0");
      chk(field(32'h400 + 2*(16 + k), 1), yd(2*k - (TD-1) + 1), "diagonal mapping output, row 1");
    end

    $display("basic mapping, %0d taps: %0d outputs in %0d cycles = %0.2f Msamples/s at 100 MHz",
             TB, KB, t_basic, 100.0 * KB / t_basic);
    $display("diagonal mapping, %0d taps: %0d outputs in %0d cycles = %0.2f Msamples/s at 100 MHz",
             TD, 2 * KD, t_diag, 100.0 * 2 * KD / t_diag);
    chk(t_basic, KB / 8 * 9, "basic mapping: 8 outputs every 9 cycles");
    chk(t_diag, 2 * KD, "diagonal mapping: 2 outputs every 2 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
