// tb_vedic_ut_mul: exhaustive self-checking test of the 4x4 Urdhava
// Tiryakbhyam multiplier.
//
// Every one of the 256 operand pairs is applied. The product is compared with
// the integer product a*b, and the carry into every column is compared with
// an independent expression: the carry into column k equals the sum of all
// bit products of lower columns, weighted by their place value, shifted right
// by k. The test also counts operand pairs that produce a carry of two or
// more bits (the multi-bit carry the rule relies on) and fails if none did.
// The multiplier is combinational: each result is checked one time step after
// its operands are applied, in the same cycle.
module tb_vedic_ut_mul;

  // Default width of the column multiplier.
  localparam int unsigned W = 4;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  logic           clk;

  int checks   = 0;
  int failures = 0;
  int multibit = 0;

  vedic_ut_mul dut (.a(a), .b(b), .p(p));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  // Carry into column k computed from place values alone.
  function automatic int unsigned ref_carry(input int unsigned x, input int unsigned y,
                                            input int unsigned k);
    int unsigned acc = 0;
    for (int unsigned i = 0; i < W; i++)
      for (int unsigned j = 0; j < W; j++)
        if (i + j < k) acc += ((x >> i) & 1) * ((y >> j) & 1) << (i + j);
    return acc >> k;
  endfunction

  initial begin
    bit saw_multibit;
    for (int unsigned x = 0; x < (1 << W); x++) begin
      for (int unsigned y = 0; y < (1 << W); y++) begin
        @(negedge clk);
        a = W'(x);
        b = W'(y);
        #1;
        checks++;
        if (p !== (2*W)'(x * y)) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d expected %0d", x, y, p, x * y);
        end
        saw_multibit = 1'b0;
        for (int unsigned k = 1; k <= 2 * W - 1; k++) begin
          checks++;
          if (int'(dut.carry[k]) != int'(ref_carry(x, y, k))) begin
            failures++;
            $display("FAIL carry into column %0d for %0d*%0d: got %0d expected %0d",
                     k, x, y, dut.carry[k], ref_carry(x, y, k));
          end
          if (ref_carry(x, y, k) >= 2) saw_multibit = 1'b1;
        end
        if (saw_multibit) multibit++;
      end
    end
    // Worked example from the column equations: 15 * 15 = 225.
    @(negedge clk);
    a = 4'hF; b = 4'hF;
    #1;
    checks++;
    if (p !== 8'd225) begin
      failures++;
      $display("FAIL 15*15 = %0d", p);
    end
    checks++;
    if (multibit == 0) begin
      failures++;
      $display("FAIL no multi-bit carry was exercised");
    end
    $display("multi-bit carries seen in %0d operand pairs", multibit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
