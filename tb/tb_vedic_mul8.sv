// tb_vedic_mul8: exhaustive self-checking test of the 8x8 Vedic multiplier.
//
// All 65536 operand pairs are applied and each product compared with the
// integer product. The worked example 8 * 4 = 32 is checked separately,
// together with its four nibble products (only X0*Y0 = 00100000 is
// non-zero). The test counts pairs whose crosswise term
// D = X1*Y0 + X0*Y1 needs a ninth bit, and pairs where D plus the upper
// nibble of C carries into the high byte, and fails if either never
// happened. The multiplier is combinational: each product is checked one
// time step after its operands change.
module tb_vedic_mul8;

  logic [7:0]  a, b;
  logic [15:0] p;
  logic        clk;

  int checks    = 0;
  int failures  = 0;
  int d_wide    = 0;
  int mid_carry = 0;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic apply(input int unsigned x, input int unsigned y);
    int unsigned d, mid;
    @(negedge clk);
    a = 8'(x);
    b = 8'(y);
    #1;
    checks++;
    if (p !== 16'(x * y)) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", x, y, p, x * y);
    end
    d   = (x >> 4) * (y & 15) + (x & 15) * (y >> 4);
    mid = d + (((x & 15) * (y & 15)) >> 4);
    if (d >= 256) d_wide++;
    if (mid >= 16) mid_carry++;
  endtask

  initial begin
    // Example from the design's simulation: a = 00001000, b = 00000100.
    apply(8, 4);
    checks++;
    if (p !== 16'b0000000000100000) begin
      failures++;
      $display("FAIL 8*4 gave %b", p);
    end
    // In that example only the low-nibble product X0*Y0 = 8*4 is non-zero.
    checks++;
    if (dut.pp_c !== 8'b00100000 || dut.pp_d0 !== 8'd0 || dut.pp_d1 !== 8'd0 ||
        dut.pp_e !== 8'd0) begin
      failures++;
      $display("FAIL 8*4 partial products %b %b %b %b", dut.pp_c, dut.pp_d0, dut.pp_d1, dut.pp_e);
    end
    for (int unsigned x = 0; x < 256; x++)
      for (int unsigned y = 0; y < 256; y++)
        apply(x, y);
    checks += 2;
    if (d_wide == 0) begin
      failures++;
      $display("FAIL crosswise sum never needed a ninth bit");
    end
    if (mid_carry == 0) begin
      failures++;
      $display("FAIL middle nibble never carried");
    end
    $display("crosswise sum over 8 bits: %0d, middle carry: %0d", d_wide, mid_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
