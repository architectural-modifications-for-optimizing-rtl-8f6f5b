// tb_dma_controller: self-checking test of the DMA controller.
// The controller talks to the behavioural main memory (random grant delays)
// and to simple frame-buffer and context-memory models kept in this
// testbench. Checked: a context load (every word lands at the right
// {block,set,word} address), a frame-buffer load (two 32-bit words per
// 64-bit word, low half first), a frame-buffer store back to a different
// main-memory area, a zero-length command, and that `done` pulses exactly
// once per command while `cmd_ready` is low during a transfer.
module tb_dma_controller;
  import m1_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, done;
  dma_cmd_t cmd;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [23:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic fb_en, fb_we, fb_set, fb_bank;
  logic [5:0] fb_addr;
  logic [63:0] fb_wdata, fb_rdata;
  logic ctx_we, ctx_block;
  logic [2:0] ctx_set;
  logic [3:0] ctx_word;
  logic [31:0] ctx_wdata;
  int checks = 0, failures = 0, dones = 0;

  logic [63:0] fbm [2][2][64];
  logic [31:0] ctxm [256];

  dma_controller dut (.*);
  main_memory_model #(.WORDS(4096)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (fb_en && fb_we) fbm[fb_set][fb_bank][fb_addr] <= fb_wdata;
    if (fb_en) fb_rdata <= fbm[fb_set][fb_bank][fb_addr];
    if (ctx_we) ctxm[{ctx_block, ctx_set, ctx_word}] <= ctx_wdata;
    if (done) dones++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input dma_cmd_t c);
    int d0;
    d0 = dones;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    if (c.count != 0) begin
      checks++;
      if (cmd_ready) begin failures++; $display("FAIL ready during transfer"); end
    end
    while (dones == d0) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (dones != d0 + 1) begin failures++; $display("FAIL done count %0d", dones - d0); end
  endtask

  function automatic logic [31:0] mpat(input int a);
    return 32'h3C000000 + 32'(a * 2654435761);
  endfunction

  initial begin
    dma_cmd_t c;
    cmd = '0;
    for (int i = 0; i < 256; i++) ctxm[i] = '0;
    for (int s = 0; s < 2; s++) for (int k = 0; k < 2; k++) for (int a = 0; a < 64; a++)
      fbm[s][k][a] = '0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = mpat(i);
    repeat (2) @(negedge clk);
    rst_n = 1;

    // context load: 20 words from 0x100 into {block 1, set 0, word 14} onwards
    c = '0; c.target = DMA_TO_CTX; c.mem_addr = 24'h100; c.local_addr = 8'h8E; c.count = 8'd20;
    run(c);
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (ctxm[8'h8E + i] !== mpat(32'h100 + i)) begin
        failures++; $display("FAIL ctx word %0d: %h", i, ctxm[8'h8E + i]);
      end
    end
    checks++;
    if (ctxm[8'h8D] !== 0 || ctxm[8'h8E + 20] !== 0) begin failures++; $display("FAIL ctx bounds"); end

    // frame-buffer load: 10 words from 0x200 into set 1 bank 0 address 3
    c = '0; c.target = DMA_TO_FB; c.mem_addr = 24'h200; c.fb_set = 1; c.fb_bank = 0;
    c.local_addr = 8'd3; c.count = 8'd10;
    run(c);
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (fbm[1][0][3 + i] !== {mpat(32'h200 + 2*i + 1), mpat(32'h200 + 2*i)}) begin
        failures++; $display("FAIL fb word %0d: %h", i, fbm[1][0][3 + i]);
      end
    end

    // frame-buffer store: 4 words of set 0 bank 1 from address 60 to 0x800
    for (int i = 0; i < 4; i++) fbm[0][1][60 + i] = {32'hAB000000 + 32'(i), 32'hCD000000 + 32'(i)};
    c = '0; c.target = DMA_TO_FB; c.store = 1; c.mem_addr = 24'h800; c.fb_set = 0; c.fb_bank = 1;
    c.local_addr = 8'd60; c.count = 8'd4;
    run(c);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (u_mem.mem[32'h800 + 2*i] !== 32'hCD000000 + 32'(i)) begin failures++; $display("FAIL store lo %0d", i); end
      if (u_mem.mem[32'h800 + 2*i + 1] !== 32'hAB000000 + 32'(i)) begin failures++; $display("FAIL store hi %0d", i); end
    end
    checks++;
    if (u_mem.mem[32'h808] !== mpat(32'h808)) begin failures++; $display("FAIL store overrun"); end

    // zero-length command completes at once
    c = '0; c.count = 0;
    run(c);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
