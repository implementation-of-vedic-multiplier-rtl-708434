// tb_vedic_matmul2x2: self-checking test of the 2x2 matrix multiplier.
//
// Checks a hand-worked product, [[1,2],[3,4]] x [[5,6],[7,8]] =
// [[19,22],[43,50]], the all-255 case whose entries need the 17th bit
// (2*255*255 = 130050), the identity, and 20000 random matrix pairs against
// a reference dot product. It counts entries that exceed 16 bits and fails if
// none did. The unit is combinational: results are checked one time step
// after the operands change.
module tb_vedic_matmul2x2;
  import vedic_pkg::*;

  elem_mat_t a;
  elem_mat_t b;
  acc_mat_t  c;
  logic  clk;

  int checks   = 0;
  int failures = 0;
  int wide     = 0;

  localparam int NRAND = 20_000;

  vedic_matmul2x2 dut (.a(a), .b(b), .c(c));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic check_all();
    int unsigned r;
    #1;
    for (int i = 0; i < DIM; i++) begin
      for (int j = 0; j < DIM; j++) begin
        r = 0;
        for (int k = 0; k < DIM; k++) r += int'(a[i][k]) * int'(b[k][j]);
        checks++;
        if (int'(c[i][j]) != int'(r)) begin
          failures++;
          $display("FAIL c[%0d][%0d] = %0d expected %0d", i, j, c[i][j], r);
        end
        if (r >= 65536) wide++;
      end
    end
  endtask

  task automatic load(input int unsigned av[4], input int unsigned bv[4]);
    @(negedge clk);
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        a[i][j] = elem_t'(av[2*i+j]);
        b[i][j] = elem_t'(bv[2*i+j]);
      end
  endtask

  initial begin
    load('{1, 2, 3, 4}, '{5, 6, 7, 8});
    check_all();
    checks += 4;
    if (c[0][0] != 19 || c[0][1] != 22 || c[1][0] != 43 || c[1][1] != 50) begin
      failures++;
      $display("FAIL worked example");
    end
    load('{255, 255, 255, 255}, '{255, 255, 255, 255});
    check_all();
    checks++;
    if (c[1][1] != 17'd130050) begin
      failures++;
      $display("FAIL all-255 entry = %0d", c[1][1]);
    end
    load('{1, 0, 0, 1}, '{9, 200, 77, 3});
    check_all();
    for (int n = 0; n < NRAND; n++) begin
      load('{$urandom_range(255), $urandom_range(255), $urandom_range(255), $urandom_range(255)},
           '{$urandom_range(255), $urandom_range(255), $urandom_range(255), $urandom_range(255)});
      check_all();
    end
    checks++;
    if (wide == 0) begin
      failures++;
      $display("FAIL no entry exceeded 16 bits");
    end
    $display("entries above 16 bits: %0d", wide);
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
