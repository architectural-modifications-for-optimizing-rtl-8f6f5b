// m1_pkg: types and constants shared by the MorphoSys M1 reconfigurable
// array with the two proposed modifications (per-cell multiply with output
// feedback, and a lower-left diagonal link into operand port B).
//
// The array size (8x8 in four 4x4 quadrants), the context memory shape
// (2 blocks x 8 sets x 16 words x 32 bits) and the frame buffer shape
// (2 sets x 2 banks x 64 words x 64 bits) follow the M1 block diagram.
// The context-word layout, the opcode and operand-source encodings and the
// command formats below are this design's own: the original encodings are
// not published with the architecture description.
package m1_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_DIM     = 8;   // RC array is N_DIM x N_DIM
  localparam int unsigned QUAD_DIM  = 4;   // quadrant edge length
  localparam int unsigned DW        = 16;  // cell datapath / output width
  localparam int unsigned EW        = 8;   // frame-buffer element per cell
  localparam int unsigned CTX_W     = 32;  // context word width
  localparam int unsigned CTX_WORDS = 16;  // context words per set
  localparam int unsigned FB_DEPTH  = 64;  // words per frame-buffer bank
  localparam int unsigned FB_W      = 64;  // frame-buffer word width
  localparam int unsigned MEM_W     = 32;  // main-memory data width
  localparam int unsigned MEM_AW    = 24;  // main-memory word address width

  // ------------------------------------------------------------ ALU ops
  typedef enum logic [3:0] {
    OP_NOP       = 4'd0,  // hold output
    OP_PASS_A    = 4'd1,  // out = A
    OP_ADD       = 4'd2,  // out = A + B
    OP_MUL_C     = 4'd3,  // out = A * C          (vector-scalar)
    OP_MAC_C     = 4'd4,  // out = A * C + B      (FIR tap)
    OP_MUL_AB    = 4'd5,  // out = A * B
    OP_MUL_OUT_C = 4'd6,  // out = C * out(t)     (proposed)
    OP_MUL_OUT_A = 4'd7   // out = A * out(t)     (proposed)
  } alu_op_e;

  // ------------------------------------------------- operand sources
  typedef enum logic [3:0] {
    SRC_BUS     = 4'd0,   // frame-buffer data bus element
    SRC_LEFT    = 4'd1,   // cell (r, c-1)
    SRC_RIGHT   = 4'd2,   // cell (r, c+1)
    SRC_TOP     = 4'd3,   // cell (r-1, c)
    SRC_BOTTOM  = 4'd4,   // cell (r+1, c)
    SRC_DIAG_LL = 4'd5,   // cell (r+1, c-1), proposed diagonal link
    SRC_QROW    = 4'd6,   // any cell of own row inside own quadrant
    SRC_QCOL    = 4'd7,   // any cell of own column inside own quadrant
    SRC_XROW    = 4'd8,   // any cell of own row in the horizontally adjacent quadrant
    SRC_XCOL    = 4'd9,   // any cell of own column in the vertically adjacent quadrant
    SRC_ZERO    = 4'd10
  } src_e;

  // ----------------------------------------------------- context word
  typedef struct packed {
    alu_op_e            op;     // [31:28]
    src_e               sel_a;  // [27:24]
    src_e               sel_b;  // [23:20]
    logic [1:0]         idx_a;  // [19:18] lane index for port A (QROW..XCOL)
    logic [1:0]         idx_b;  // [17:16] lane index for port B
    logic signed [15:0] c;      // [15:0]  constant
  } ctx_word_t;

  // Broadcast mode: row mode uses context block 0, column mode block 1.
  typedef enum logic {
    MODE_ROW = 1'b0,
    MODE_COL = 1'b1
  } bcast_mode_e;

  // ------------------------------------------------ array commands
  typedef enum logic [1:0] {
    CMD_NOP   = 2'd0,
    CMD_BCAST = 2'd1,   // context broadcast with frame-buffer operand
    CMD_WBACK = 2'd2    // write one row/column of results to the frame buffer
  } cmd_kind_e;

  typedef struct packed {
    cmd_kind_e   kind;
    bcast_mode_e mode;
    logic        all;        // BCAST: every row/column active
    logic        wide;       // BCAST: both banks, 16-bit elements
    logic [2:0]  line;       // row or column index
    logic [3:0]  ctx_word;   // BCAST: context word inside the set
    logic        fb_set;
    logic        fb_bank;    // BCAST, not wide: bank read (0 = A, 1 = B)
    logic [5:0]  fb_addr;    // frame-buffer word address
  } array_cmd_t;

  // ------------------------------------------------- DMA commands
  typedef enum logic {
    DMA_TO_FB  = 1'b0,
    DMA_TO_CTX = 1'b1
  } dma_target_e;

  typedef struct packed {
    dma_target_e       target;
    logic              store;      // 1: frame buffer -> main memory
    logic [MEM_AW-1:0] mem_addr;   // main-memory word address
    logic              fb_set;
    logic              fb_bank;
    logic [7:0]        local_addr; // FB word (5:0) or context address {block,set,word}
    logic [7:0]        count;      // local words to move, 0 means none
  } dma_cmd_t;

endpackage
