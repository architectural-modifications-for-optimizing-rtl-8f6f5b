// tb_rc_array_ctrl: self-checking test of the array instruction sequencer.
// Issues a stream of random broadcast, write-back and empty commands, one per
// cycle, and checks that (a) a broadcast raises the context-memory and
// frame-buffer reads in the same cycle with the command's fields, (b) one
// cycle later the array sees the command's mode, the right one-hot (or
// all-ones) line enable and the right bus (one bank or both), and (c) a
// write-back one cycle later writes the right row or column of cell outputs (given here as coordinate codes)
// packed with result 0 in the low 16 bits. A reference pipeline register in
// the testbench supplies the expected stage-1 values.
module tb_rc_array_ctrl;
  import m1_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  array_cmd_t cmd;
  logic ctx_rd_en, ctx_rd_block, fb_rd_en, fb_rd_set;
  logic [127:0] fb_rd_data, arr_bus;
  logic arr_wide;
  logic [3:0] ctx_rd_word;
  logic [5:0] fb_rd_addr, fb_wr_addr;
  logic fb_wr_en, fb_wr_set;
  logic [127:0] fb_wr_data;
  bcast_mode_e arr_mode;
  logic [7:0] arr_line_en;
  logic signed [15:0] cell_out [8][8];
  int checks = 0, failures = 0, n_bcast = 0, n_wback = 0;

  rc_array_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic prev_v;
    array_cmd_t prev;
    logic [127:0] exp_wb;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) cell_out[r][c] = 16'(16'h7000 + r * 16 + c);
    cmd = '0;
    prev_v = 0; prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      // drive a new command
      cmd_valid = ($urandom_range(0, 5) != 0);
      cmd = array_cmd_t'({$urandom, $urandom});
      cmd.kind = cmd_kind_e'($urandom_range(0, 2));
      fb_rd_data = {$urandom, $urandom, $urandom, $urandom};
      #1;
      // stage 0
      chk(ctx_rd_en, cmd_valid && cmd.kind == CMD_BCAST, "ctx read enable");
      chk(fb_rd_en,  cmd_valid && cmd.kind == CMD_BCAST, "fb read enable");
      if (cmd_valid && cmd.kind == CMD_BCAST) begin
        chk({ctx_rd_block, ctx_rd_word}, {cmd.mode, cmd.ctx_word}, "ctx read address");
        chk({fb_rd_set, fb_rd_addr}, {cmd.fb_set, cmd.fb_addr}, "fb read address");
      end
      // stage 1 holds the previous cycle's command
      if (prev_v && prev.kind == CMD_BCAST) begin
        n_bcast++;
        chk(arr_mode, prev.mode, "array mode");
        chk(arr_line_en, prev.all ? 8'hFF : 8'(1 << prev.line), "line enable");
        chk(arr_wide, prev.wide, "wide flag");
        chk(arr_bus, prev.wide ? fb_rd_data : {64'h0, prev.fb_bank ? fb_rd_data[127:64] : fb_rd_data[63:0]},
            "bus selection");
      end else begin
        chk(arr_line_en, 8'h00, "no execution");
      end
      chk(fb_wr_en, prev_v && prev.kind == CMD_WBACK, "write-back enable");
      if (prev_v && prev.kind == CMD_WBACK) begin
        n_wback++;
        for (int k = 0; k < 8; k++)
          exp_wb[k*16 +: 16] = (prev.mode == MODE_COL) ? 16'(16'h7000 + k * 16 + prev.line)
                                                       : 16'(16'h7000 + prev.line * 16 + k);
        chk(fb_wr_data, exp_wb, "write-back data");
        chk({fb_wr_set, fb_wr_addr}, {prev.fb_set, prev.fb_addr}, "write-back address");
      end
      @(negedge clk);
      prev_v = cmd_valid && cmd.kind != CMD_NOP;
      prev = cmd;
    end
    checks++;
    if (n_bcast == 0 || n_wback == 0) begin failures++; $display("FAIL command kind never issued"); end
    $display("broadcasts %0d, write-backs %0d", n_bcast, n_wback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
