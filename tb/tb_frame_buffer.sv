// tb_frame_buffer: self-checking test of the frame buffer.
// Fills all 2 sets x 2 banks x 64 words through the DMA port, reads them
// back through the array read port (both banks at once) and the DMA port
// (data one cycle after the enable), then checks a 128-bit array write-back: low half into
// bank A, high half into bank B of the chosen set, other set untouched.
// Finally the DMA port reads set 0 while the array writes set 1 in the same
// cycle, the double-buffered use of the two sets.
module tb_frame_buffer;
  logic clk = 0;
  logic ar_en = 0, ar_set = 0;
  logic [5:0] ar_addr = 0;
  logic [127:0] ar_data;
  logic aw_en = 0, aw_set = 0;
  logic [5:0] aw_addr = 0;
  logic [127:0] aw_data = 0;
  logic d_en = 0, d_we = 0, d_set = 0, d_bank = 0;
  logic [5:0] d_addr = 0;
  logic [63:0] d_wdata = 0, d_rdata;
  int checks = 0, failures = 0;

  frame_buffer dut (.clk, .ar_en, .ar_set, .ar_addr, .ar_data,
                    .aw_en, .aw_set, .aw_addr, .aw_data,
                    .d_en, .d_we, .d_set, .d_bank, .d_addr, .d_wdata, .d_rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] pat(input int s, input int k, input int a);
    return {32'(s * 1000 + k * 100 + a), 32'hC0DE0000 | 32'(a * 3 + k + s * 5)};
  endfunction

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 2; k++)
        for (int a = 0; a < 64; a++) begin
          @(negedge clk);
          d_en = 1; d_we = 1; d_set = s[0]; d_bank = k[0]; d_addr = 6'(a); d_wdata = pat(s, k, a);
        end
    @(negedge clk);
    d_en = 0; d_we = 0;
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 2; k++)
        for (int a = 0; a < 64; a += 7) begin
          @(negedge clk);
          ar_en = 1; ar_set = s[0]; ar_addr = 6'(a);
          d_en = 1; d_set = s[0]; d_bank = k[0]; d_addr = 6'(63 - a);
          @(negedge clk);
          ar_en = 0; d_en = 0;
          chk(k == 0 ? ar_data[63:0] : ar_data[127:64], pat(s, k, a), "array read");
          chk(d_rdata, pat(s, k, 63 - a), "dma read");
        end
    // write-back into set 1, address 9
    @(negedge clk);
    aw_en = 1; aw_set = 1; aw_addr = 6'd9; aw_data = {64'h1111222233334444, 64'h5555666677778888};
    // at the same time the DMA reads set 0 (double buffering)
    d_en = 1; d_set = 0; d_bank = 0; d_addr = 6'd9;
    @(negedge clk);
    aw_en = 0; d_en = 0;
    chk(d_rdata, pat(0, 0, 9), "dma read during write-back");
    ar_en = 1; ar_set = 1; ar_addr = 6'd9;
    @(negedge clk);
    ar_en = 0;
    chk(ar_data[63:0], 64'h5555666677778888, "write-back bank A");
    chk(ar_data[127:64], 64'h1111222233334444, "write-back bank B");
    ar_en = 1; ar_set = 0; ar_addr = 6'd9;
    @(negedge clk);
    ar_en = 0;
    chk(ar_data[63:0], pat(0, 0, 9), "other set untouched, bank A");
    chk(ar_data[127:64], pat(0, 1, 9), "other set untouched, bank B");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
