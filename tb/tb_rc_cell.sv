// tb_rc_cell: self-checking test of one reconfigurable cell.
// Drives random operands, constants and opcodes (every opcode, including the
// feedback multiplies C x Out(t) and A x Out(t)), with the enable sometimes
// low, and compares the registered output after each edge with a model
// computed here in 32-bit integer arithmetic and truncated to 16 bits.
module tb_rc_cell;
  import m1_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  ctx_word_t ctx;
  logic signed [15:0] a, b, out;
  int checks = 0, failures = 0;
  int cycles = 0;

  rc_cell dut (.clk, .rst_n, .en, .ctx, .a, .b, .out);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] model(input alu_op_e op, input int av, input int bv,
                                               input int cv, input int ov, input bit e);
    int r;
    if (!e) return 16'(ov);
    case (op)
      OP_PASS_A:    r = av;
      OP_ADD:       r = av + bv;
      OP_MUL_C:     r = av * cv;
      OP_MAC_C:     r = av * cv + bv;
      OP_MUL_AB:    r = av * bv;
      OP_MUL_OUT_C: r = cv * ov;
      OP_MUL_OUT_A: r = av * ov;
      default:      r = ov;
    endcase
    return 16'(r);
  endfunction

  initial begin
    logic signed [15:0] prev, exp;
    ctx = '0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    if (out !== 16'sd0) failures++;
    checks++;
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      prev = out;
      ctx = '0;
      ctx.op = alu_op_e'(i < 16 ? i % 16 : $urandom_range(0, 15));
      // keep values small now and then so feedback products stay readable
      a = (i % 4 == 0) ? 16'($signed($urandom_range(0, 20)) - 10) : 16'($urandom);
      b = 16'($urandom);
      ctx.c = (i % 3 == 0) ? 16'($signed($urandom_range(0, 6)) - 3) : 16'($urandom);
      en = ($urandom_range(0, 7) != 0);
      exp = model(ctx.op, a, b, ctx.c, prev, en);
      @(posedge clk); #1;
      checks++;
      if (out !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%0d en=%0b a=%0d b=%0d c=%0d prev=%0d out=%0d exp=%0d",
                   ctx.op, en, a, b, ctx.c, prev, out, exp);
      end
    end
    // Feedback chain: C1 x A, then C2 x Out(t) repeated, the composite scaling.
    @(negedge clk);
    en = 1; ctx = '0; ctx.op = OP_MUL_C; ctx.c = 16'sd3; a = 16'sd7;
    @(negedge clk);
    ctx.op = OP_MUL_OUT_C; ctx.c = -16'sd2; a = 16'sd100;
    @(negedge clk);
    en = 0;
    checks++;
    if (out !== -16'sd42) begin
      failures++;
      $display("FAIL composite scaling out=%0d exp=-42", out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
