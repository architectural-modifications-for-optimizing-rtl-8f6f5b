// rc_array_ctrl: executes the control processor's RC-array instructions.
//
// Two instructions reach the array, one per cycle, with no stalls:
//   * CMD_BCAST (the "sbc" broadcast): read context word `ctx_word` of the
//     row block (row mode) or column block (column mode) from the context
//     memory, read the frame buffer at `fb_addr` of `fb_set` as the data
//     bus, and let the selected row/column (or all of them, `all`) execute.
//     A plain broadcast uses bank `fb_bank` as 8 elements of 8 bits; a wide
//     one uses both banks as 8 elements of 16 bits (the write-back layout).
//   * CMD_WBACK (the "wfbi" write-back): write the 8 results of row or
//     column `line` into the frame buffer at `fb_addr` of set `fb_set`.
// Pipeline: stage 0 issues the two synchronous memory reads; stage 1 drives
// the array (the cells update at the end of stage 1) or the write-back. Both
// instructions pass through stage 1 in order, so a write-back issued the
// cycle after a broadcast sees that broadcast's results.
//
// The two instructions and what they do come from the M1 instruction set as
// used in the composite-scaling code; their field layout and the two-stage
// pipeline are this design's own.
module rc_array_ctrl
  import m1_pkg::*;
#(
  parameter int unsigned N = N_DIM,
  parameter int unsigned W = DW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cmd_valid,
  input  array_cmd_t          cmd,
  // context memory read
  output logic                ctx_rd_en,
  output logic                ctx_rd_block,
  output logic [3:0]          ctx_rd_word,
  // frame buffer array ports
  output logic                fb_rd_en,
  output logic                fb_rd_set,
  output logic [5:0]          fb_rd_addr,
  input  logic [N*W-1:0]      fb_rd_data,
  output logic                fb_wr_en,
  output logic                fb_wr_set,
  output logic [5:0]          fb_wr_addr,
  output logic [N*W-1:0]      fb_wr_data,
  // array control
  output bcast_mode_e         arr_mode,
  output logic [N-1:0]        arr_line_en,
  output logic [N*W-1:0]      arr_bus,
  output logic                arr_wide,
  input  logic signed [W-1:0] cell_out [N][N]
);

  logic       s1_valid;
  array_cmd_t s1;

  // Stage 0: issue the memory reads.
  always_comb begin
    ctx_rd_en    = cmd_valid && cmd.kind == CMD_BCAST;
    ctx_rd_block = cmd.mode;
    ctx_rd_word  = cmd.ctx_word;
    fb_rd_en     = cmd_valid && cmd.kind == CMD_BCAST;
    fb_rd_set    = cmd.fb_set;
    fb_rd_addr   = cmd.fb_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1       <= '0;
    end else begin
      s1_valid <= cmd_valid && cmd.kind != CMD_NOP;
      if (cmd_valid) s1 <= cmd;
    end
  end

  // Stage 1: execute or write back.
  always_comb begin
    arr_mode    = s1.mode;
    arr_wide    = s1.wide;
    // single bank: the chosen bank's word in the low half
    if (s1.wide)         arr_bus = fb_rd_data;
    else if (s1.fb_bank) arr_bus = {{(N*W/2){1'b0}}, fb_rd_data[N*W-1:N*W/2]};
    else                 arr_bus = {{(N*W/2){1'b0}}, fb_rd_data[N*W/2-1:0]};
    arr_line_en = '0;
    if (s1_valid && s1.kind == CMD_BCAST)
      arr_line_en = s1.all ? '1 : (N)'(1) << s1.line;

    fb_wr_en   = s1_valid && s1.kind == CMD_WBACK;
    fb_wr_set  = s1.fb_set;
    fb_wr_addr = s1.fb_addr;
    for (int i = 0; i < int'(N); i++)
      fb_wr_data[i*W +: W] = (s1.mode == MODE_COL) ? cell_out[i][s1.line]
                                                   : cell_out[s1.line][i];
  end

  // A broadcast executes either one row/column or all of them.
  a_line_en: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(arr_line_en) || arr_line_en == '1)
    else $error("line enable is neither one-hot nor all ones");

endmodule
