// tb_context_memory: self-checking test of the context memory.
// Writes every word of both blocks with a value derived from its address,
// then reads each word index of each block and checks that all 8 sets are
// returned at once, one cycle after the read enable. It also checks that a
// write with the read disabled leaves the read data unchanged and that a
// read in the same cycle as a write to that word returns the old word.
module tb_context_memory;
  import m1_pkg::*;

  logic clk = 0;
  logic wr_en = 0, wr_block = 0, rd_en = 0, rd_block = 0;
  logic [2:0] wr_set = 0;
  logic [3:0] wr_word = 0, rd_word = 0;
  logic [31:0] wr_data = 0;
  ctx_word_t rd_data [8];
  int checks = 0, failures = 0;

  context_memory dut (.clk, .wr_en, .wr_block, .wr_set, .wr_word, .wr_data,
                      .rd_en, .rd_block, .rd_word, .rd_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(input int blk, input int s, input int w);
    return 32'hA5000000 ^ (blk << 20) ^ (s << 12) ^ (w << 4) ^ (blk * 7 + s * 3 + w);
  endfunction

  initial begin
    for (int blk = 0; blk < 2; blk++)
      for (int s = 0; s < 8; s++)
        for (int w = 0; w < 16; w++) begin
          @(negedge clk);
          wr_en = 1; wr_block = blk[0]; wr_set = 3'(s); wr_word = 4'(w);
          wr_data = pat(blk, s, w);
        end
    @(negedge clk);
    wr_en = 0;
    for (int blk = 0; blk < 2; blk++)
      for (int w = 0; w < 16; w++) begin
        @(negedge clk);
        rd_en = 1; rd_block = blk[0]; rd_word = 4'(w);
        @(negedge clk);
        rd_en = 0;
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (rd_data[s] !== pat(blk, s, w)) begin
            failures++;
            $display("FAIL blk %0d set %0d word %0d: %h", blk, s, w, rd_data[s]);
          end
        end
      end
    // read-before-write on the same word, and hold when not reading
    @(negedge clk);
    rd_en = 1; rd_block = 1; rd_word = 4'd5;
    wr_en = 1; wr_block = 1; wr_set = 3'd2; wr_word = 4'd5; wr_data = 32'hDEADBEEF;
    @(negedge clk);
    rd_en = 0; wr_en = 0;
    checks++;
    if (rd_data[2] !== pat(1, 2, 5)) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    checks++;
    if (rd_data[2] !== pat(1, 2, 5)) begin failures++; $display("FAIL hold"); end
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_data[2] !== 32'hDEADBEEF) begin failures++; $display("FAIL new word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
