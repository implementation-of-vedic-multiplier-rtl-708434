// tb_vedic_dsp_top: end-to-end test of the top level at its default sizes.
//
// Each step applies one 2x2 matrix pair to the matrix unit and one operand
// pair to the 16x16 multiplier, then checks all four matrix entries and the
// 16-bit product against integer arithmetic. Alongside the checks it counts
// how often each arithmetic mechanism of the design was exercised, working
// each out from the operands independently of the hardware:
//   * a carry of two or more bits between columns of a 4x4 Urdhava
//     Tiryakbhyam multiplier,
//   * a crosswise term X1*Y0 + X0*Y1 wider than a product at the 8x8 level,
//   * the same at the 16x16 level,
//   * a matrix entry above 16 bits (the dot-product adder's extra bit).
// A mechanism that never happened counts as a failure. Everything is
// combinational, so each result is checked in the cycle its operands are
// applied.
module tb_vedic_dsp_top;
  import vedic_pkg::*;

  elem_mat_t       mat_a;
  elem_mat_t       mat_b;
  acc_mat_t        mat_c;
  logic [15:0] mul_a, mul_b;
  logic [31:0] mul_p;
  logic        clk;

  int checks   = 0;
  int failures = 0;
  int n_multibit_carry = 0;
  int n_cross8_wide    = 0;
  int n_cross16_wide   = 0;
  int n_acc_wide       = 0;

  localparam int NSTEPS = 20_000;

  vedic_dsp_top dut (
      .mat_a(mat_a), .mat_b(mat_b), .mat_c(mat_c),
      .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  // True if a 4x4 column multiplication of x and y passes a carry of 2 or
  // more into some column: carry into column k = (lower-column products) >> k.
  function automatic bit nib_multibit(input int unsigned x, input int unsigned y);
    for (int unsigned k = 1; k < 8; k++) begin
      int unsigned acc = 0;
      for (int unsigned i = 0; i < 4; i++)
        for (int unsigned j = 0; j < 4; j++)
          if (i + j < k) acc += ((x >> i) & 1) * ((y >> j) & 1) << (i + j);
      if ((acc >> k) >= 2) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic void note_mul8(input int unsigned x, input int unsigned y);
    if (nib_multibit(x & 15, y & 15) || nib_multibit(x >> 4, y >> 4) ||
        nib_multibit(x >> 4, y & 15) || nib_multibit(x & 15, y >> 4))
      n_multibit_carry++;
    if ((x >> 4) * (y & 15) + (x & 15) * (y >> 4) >= 256) n_cross8_wide++;
  endfunction

  task automatic step(input int unsigned av[4], input int unsigned bv[4],
                      input logic [15:0] x, input logic [15:0] y);
    @(negedge clk);
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        mat_a[i][j] = elem_t'(av[2*i+j]);
        mat_b[i][j] = elem_t'(bv[2*i+j]);
      end
    mul_a = x;
    mul_b = y;
    #1;
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        int unsigned r = 0;
        for (int k = 0; k < DIM; k++) begin
          r += av[2*i+k] * bv[2*k+j];
          note_mul8(av[2*i+k], bv[2*k+j]);
        end
        checks++;
        if (int'(mat_c[i][j]) != int'(r)) begin
          failures++;
          $display("FAIL mat_c[%0d][%0d] = %0d expected %0d", i, j, mat_c[i][j], r);
        end
        if (r >= 65536) n_acc_wide++;
      end
    checks++;
    if (mul_p !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL %0d * %0d = %0d", x, y, mul_p);
    end
    if (33'(x[15:8]) * 33'(y[7:0]) + 33'(x[7:0]) * 33'(y[15:8]) >= 33'd65536)
      n_cross16_wide++;
  endtask

  initial begin
    step('{1, 2, 3, 4}, '{5, 6, 7, 8}, 16'd325, 16'd738);
    checks += 2;
    if (mat_c[0][0] != 19 || mat_c[0][1] != 22 || mat_c[1][0] != 43 || mat_c[1][1] != 50) begin
      failures++;
      $display("FAIL worked matrix example");
    end
    if (mul_p != 32'd239850) begin
      failures++;
      $display("FAIL 325*738 = %0d", mul_p);
    end
    step('{255, 255, 255, 255}, '{255, 255, 255, 255}, 16'hFFFF, 16'hFFFF);
    step('{8, 0, 0, 8}, '{4, 0, 0, 4}, 16'd8, 16'd4);
    for (int n = 0; n < NSTEPS; n++)
      step('{$urandom_range(255), $urandom_range(255), $urandom_range(255), $urandom_range(255)},
           '{$urandom_range(255), $urandom_range(255), $urandom_range(255), $urandom_range(255)},
           16'($urandom), 16'($urandom));
    $display("multi-bit column carry: %0d, 8-bit crosswise overflow: %0d, 16-bit crosswise overflow: %0d, 17-bit matrix entry: %0d",
             n_multibit_carry, n_cross8_wide, n_cross16_wide, n_acc_wide);
    checks += 4;
    if (n_multibit_carry == 0) begin failures++; $display("FAIL no multi-bit carry"); end
    if (n_cross8_wide == 0)    begin failures++; $display("FAIL no 8-bit crosswise overflow"); end
    if (n_cross16_wide == 0)   begin failures++; $display("FAIL no 16-bit crosswise overflow"); end
    if (n_acc_wide == 0)       begin failures++; $display("FAIL no 17-bit matrix entry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSTEPS + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
