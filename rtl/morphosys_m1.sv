// morphosys_m1: the reconfigurable part of the MorphoSys M1 system with the
// two proposed modifications (per-cell multiply with output feedback in the
// cell ALU, and the lower-left diagonal link into operand port B).
//
// Blocks and connections follow the M1 block diagram: the DMA controller
// loads context words from main memory into the context memory (2x8x16x32)
// and application data into the frame buffer (2x2x64x64), and stores
// results back; the 8x8 RC array takes a 256-bit context broadcast from the
// context memory and a data bus from the frame buffer (64 bits of one bank,
// or 128 bits of both banks in a wide broadcast), and writes its results
// back to the frame buffer, 128 bits at a time.
//
// The control processor is not part of this design. Its two command
// streams are ports instead: `dma_cmd_*` (the DMA instructions) and
// `arr_cmd_*` (the array broadcast and write-back instructions, one per
// cycle). The 16-bit path from the array back to the processor is the
// `probe_*` port, which reads the output of any one cell combinationally.
// Main memory is external; see dma_controller for its handshake.
module morphosys_m1
  import m1_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // DMA commands
  input  logic              dma_cmd_valid,
  output logic              dma_cmd_ready,
  input  dma_cmd_t          dma_cmd,
  output logic              dma_done,
  // RC array commands
  input  logic              arr_cmd_valid,
  input  array_cmd_t        arr_cmd,
  // cell output read-back
  input  logic [2:0]        probe_row,
  input  logic [2:0]        probe_col,
  output logic [DW-1:0]     probe_data,
  // main memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [MEM_W-1:0]  mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [MEM_W-1:0]  mem_rdata
);

  // DMA <-> memories
  logic              d_en, d_we, d_set, d_bank;
  logic [5:0]        d_addr;
  logic [FB_W-1:0]   d_wdata, d_rdata;
  logic              cw_en, cw_block;
  logic [2:0]        cw_set;
  logic [3:0]        cw_word;
  logic [CTX_W-1:0]  cw_data;

  // controller <-> memories and array
  logic              cr_en, cr_block;
  logic [3:0]        cr_word;
  ctx_word_t         ctx_bcast [N_DIM];
  logic              ar_en, ar_set;
  logic [5:0]        ar_addr;
  logic [2*FB_W-1:0] ar_data;
  logic [2*FB_W-1:0] arr_bus;
  logic              arr_wide;
  logic              aw_en, aw_set;
  logic [5:0]        aw_addr;
  logic [N_DIM*DW-1:0] aw_data;
  bcast_mode_e       mode;
  logic [N_DIM-1:0]  line_en;
  logic signed [DW-1:0] cell_out [N_DIM][N_DIM];

  dma_controller u_dma (
    .clk, .rst_n,
    .cmd_valid (dma_cmd_valid), .cmd_ready (dma_cmd_ready), .cmd (dma_cmd), .done (dma_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .fb_en (d_en), .fb_we (d_we), .fb_set (d_set), .fb_bank (d_bank),
    .fb_addr (d_addr), .fb_wdata (d_wdata), .fb_rdata (d_rdata),
    .ctx_we (cw_en), .ctx_block (cw_block), .ctx_set (cw_set), .ctx_word (cw_word),
    .ctx_wdata (cw_data)
  );

  context_memory u_ctx (
    .clk,
    .wr_en (cw_en), .wr_block (cw_block), .wr_set (cw_set), .wr_word (cw_word),
    .wr_data (cw_data),
    .rd_en (cr_en), .rd_block (cr_block), .rd_word (cr_word), .rd_data (ctx_bcast)
  );

  frame_buffer u_fb (
    .clk,
    .ar_en, .ar_set, .ar_addr, .ar_data,
    .aw_en, .aw_set, .aw_addr, .aw_data,
    .d_en, .d_we, .d_set, .d_bank, .d_addr, .d_wdata, .d_rdata
  );

  rc_array_ctrl u_ctrl (
    .clk, .rst_n,
    .cmd_valid (arr_cmd_valid), .cmd (arr_cmd),
    .ctx_rd_en (cr_en), .ctx_rd_block (cr_block), .ctx_rd_word (cr_word),
    .fb_rd_en (ar_en), .fb_rd_set (ar_set), .fb_rd_addr (ar_addr), .fb_rd_data (ar_data),
    .fb_wr_en (aw_en), .fb_wr_set (aw_set), .fb_wr_addr (aw_addr), .fb_wr_data (aw_data),
    .arr_mode (mode), .arr_line_en (line_en), .arr_bus (arr_bus), .arr_wide (arr_wide),
    .cell_out (cell_out)
  );

  rc_array u_array (
    .clk, .rst_n,
    .mode, .ctx_words (ctx_bcast), .bus (arr_bus), .wide (arr_wide), .line_en,
    .cell_out
  );

  assign probe_data = cell_out[probe_row][probe_col];

endmodule
