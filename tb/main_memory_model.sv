// main_memory_model: behavioural model of the external main memory, for
// testbenches only. It answers the DMA controller's request handshake: a
// request is granted after 0..MAX_WAIT extra cycles (random), a write is
// performed at the grant, and read data returns with `rvalid` one cycle
// after the grant. Words are 32 bits and word-addressed; only the low
// log2(WORDS) address bits are decoded. Not synthesizable by intent.
module main_memory_model #(
  parameter int unsigned WORDS    = 4096,
  parameter int unsigned AW       = 24,
  parameter int unsigned MAX_WAIT = 2
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic          gnt,
  output logic          rvalid,
  output logic [31:0]   rdata
);

  logic [31:0] mem [WORDS];
  int          wait_left = 0;
  logic        busy = 1'b0;

  initial begin
    gnt = 1'b0; rvalid = 1'b0; rdata = '0;
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  // Grant logic: pick a random wait when a new request appears.
  always_comb gnt = req && busy && (wait_left == 0);

  always_ff @(posedge clk) begin
    rvalid <= 1'b0;
    if (req && !busy) begin
      busy      <= 1'b1;
      wait_left <= $urandom_range(0, MAX_WAIT);
    end else if (busy && wait_left > 0) begin
      wait_left <= wait_left - 1;
    end else if (gnt) begin
      busy <= 1'b0;
      if (we) mem[addr[$clog2(WORDS)-1:0]] <= wdata;
      else begin
        rvalid <= 1'b1;
        rdata  <= mem[addr[$clog2(WORDS)-1:0]];
      end
    end
  end

endmodule
