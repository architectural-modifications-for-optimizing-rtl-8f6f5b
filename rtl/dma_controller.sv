// dma_controller: moves data between main memory and the on-chip memories.
//
// One command moves `count` local words:
//   * load into the context memory: `count` 32-bit main-memory words, each
//     written as one context word; the context address {block,set,word}
//     steps through local_addr, local_addr+1, ...
//   * load into the frame buffer: two 32-bit main-memory words make one
//     64-bit frame-buffer word (the first word is the low half);
//   * store from the frame buffer: each 64-bit word is read and written to
//     main memory as two 32-bit words, low half first.
// Main-memory addresses are word addresses and increase by one per 32-bit
// word. The command is taken when `cmd_valid` and `cmd_ready` are both high;
// `done` pulses for one cycle when the last word has been moved.
//
// Main-memory port: `mem_req` is held with its address (and write data)
// until `mem_gnt`; read data returns later with `mem_rvalid`. One request is
// outstanding at a time. Assertions check these rules in simulation.
//
// That the DMA controller loads contexts and frame-buffer data is M1's; the
// command format, the memory handshake and the word ordering are this
// design's own, so its throughput (one 32-bit word per two cycles with a
// one-cycle memory) is not a figure of the architecture.
module dma_controller
  import m1_pkg::*;
#(
  parameter int unsigned AW = MEM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  dma_cmd_t          cmd,
  output logic              done,
  // main memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [MEM_W-1:0]  mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [MEM_W-1:0]  mem_rdata,
  // frame buffer DMA port
  output logic              fb_en,
  output logic              fb_we,
  output logic              fb_set,
  output logic              fb_bank,
  output logic [5:0]        fb_addr,
  output logic [FB_W-1:0]   fb_wdata,
  input  logic [FB_W-1:0]   fb_rdata,
  // context memory write port
  output logic              ctx_we,
  output logic              ctx_block,
  output logic [2:0]        ctx_set,
  output logic [3:0]        ctx_word,
  output logic [CTX_W-1:0]  ctx_wdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_RD_REQ, S_RD_WAIT, S_FB_RD, S_FB_WAIT, S_WR_LO, S_WR_HI
  } state_e;

  state_e              state;
  dma_target_e         target;
  logic                set_q, bank_q;
  logic [AW-1:0]       maddr;
  logic [7:0]          laddr;
  logic [7:0]          remaining;
  logic                half;          // low half of an FB word already read
  logic [MEM_W-1:0]    low_q;
  logic [FB_W-1:0]     buf_q;

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      target    <= DMA_TO_FB;
      set_q     <= 1'b0;
      bank_q    <= 1'b0;
      maddr     <= '0;
      laddr     <= '0;
      remaining <= '0;
      half      <= 1'b0;
      low_q     <= '0;
      buf_q     <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            target    <= cmd.target;
            set_q     <= cmd.fb_set;
            bank_q    <= cmd.fb_bank;
            maddr     <= cmd.mem_addr;
            laddr     <= cmd.local_addr;
            remaining <= cmd.count;
            half      <= 1'b0;
            if (cmd.count == 8'd0)  done  <= 1'b1;
            else if (cmd.store)     state <= S_FB_RD;
            else                    state <= S_RD_REQ;
          end
        end
        S_RD_REQ: if (mem_gnt) state <= S_RD_WAIT;
        S_RD_WAIT: begin
          if (mem_rvalid) begin
            maddr <= maddr + 1'b1;
            if (target == DMA_TO_FB && !half) begin
              low_q <= mem_rdata;
              half  <= 1'b1;
              state <= S_RD_REQ;
            end else begin
              half      <= 1'b0;
              laddr     <= laddr + 1'b1;
              remaining <= remaining - 1'b1;
              if (remaining == 8'd1) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                state <= S_RD_REQ;
              end
            end
          end
        end
        S_FB_RD:   state <= S_FB_WAIT;
        S_FB_WAIT: begin
          buf_q <= fb_rdata;
          state <= S_WR_LO;
        end
        S_WR_LO: if (mem_gnt) begin
          maddr <= maddr + 1'b1;
          state <= S_WR_HI;
        end
        S_WR_HI: if (mem_gnt) begin
          maddr     <= maddr + 1'b1;
          laddr     <= laddr + 1'b1;
          remaining <= remaining - 1'b1;
          if (remaining == 8'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_FB_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Main-memory requests.
  always_comb begin
    mem_req   = (state == S_RD_REQ) || (state == S_WR_LO) || (state == S_WR_HI);
    mem_we    = (state == S_WR_LO) || (state == S_WR_HI);
    mem_addr  = maddr;
    mem_wdata = (state == S_WR_HI) ? buf_q[FB_W-1:MEM_W] : buf_q[MEM_W-1:0];
  end

  // Local memory accesses.
  logic load_beat;
  assign load_beat = (state == S_RD_WAIT) && mem_rvalid;

  always_comb begin
    fb_en     = (state == S_FB_RD) || (load_beat && target == DMA_TO_FB && half);
    fb_we     = (state == S_RD_WAIT);
    fb_set    = set_q;
    fb_bank   = bank_q;
    fb_addr   = laddr[5:0];
    fb_wdata  = {mem_rdata, low_q};
    ctx_we    = load_beat && target == DMA_TO_CTX;
    ctx_block = laddr[7];
    ctx_set   = laddr[6:4];
    ctx_word  = laddr[3:0];
    ctx_wdata = mem_rdata;
  end

  // Rules of the main-memory handshake: a request keeps its address, kind
  // and data until it is granted, and read data only returns while a read
  // is outstanding.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_gnt |=> mem_req && $stable(mem_we) && $stable(mem_addr) && $stable(mem_wdata))
    else $error("main-memory request changed before its grant");
  a_rvalid_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> state == S_RD_WAIT)
    else $error("main-memory read data without an outstanding read");

endmodule
