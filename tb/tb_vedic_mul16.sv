// tb_vedic_mul16: self-checking test of the 16x16 Vedic multiplier.
//
// Applies corner values (0, 1, all ones, single bits), the simulation example
// 8 * 4 = 32, the decimal worked example 325 * 738 = 239850, and 200000
// random operand pairs, comparing each product with the integer product.
// It counts pairs whose crosswise term X1*Y0 + X0*Y1 needs a 17th bit and
// fails if none occurred. Products are checked one time step after the
// operands change: the unit is combinational.
module tb_vedic_mul16;

  logic [15:0] a, b;
  logic [31:0] p;
  logic        clk;

  int checks   = 0;
  int failures = 0;
  int d_wide   = 0;

  localparam int unsigned NRAND = 200_000;

  vedic_mul16 dut (.a(a), .b(b), .p(p));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] expect_p;
    logic [32:0] d;
    @(negedge clk);
    a = x;
    b = y;
    #1;
    expect_p = 32'(x) * 32'(y);
    checks++;
    if (p !== expect_p) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", x, y, p, expect_p);
    end
    d = 33'(x[15:8]) * 33'(y[7:0]) + 33'(x[7:0]) * 33'(y[15:8]);
    if (d >= 33'd65536) d_wide++;
  endtask

  initial begin
    apply(16'd8, 16'd4);
    checks++;
    if (p !== 32'd32) begin
      failures++;
      $display("FAIL 8*4 gave %0d", p);
    end
    apply(16'd325, 16'd738);
    checks++;
    if (p !== 32'd239850) begin
      failures++;
      $display("FAIL 325*738 gave %0d", p);
    end
    apply(16'h0000, 16'hFFFF);
    apply(16'hFFFF, 16'h0001);
    apply(16'hFFFF, 16'hFFFF);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        apply(16'(1) << i, 16'(1) << j);
    for (int n = 0; n < NRAND; n++)
      apply(16'($urandom), 16'($urandom));
    checks++;
    if (d_wide == 0) begin
      failures++;
      $display("FAIL crosswise sum never needed a 17th bit");
    end
    $display("crosswise sum over 16 bits: %0d", d_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
