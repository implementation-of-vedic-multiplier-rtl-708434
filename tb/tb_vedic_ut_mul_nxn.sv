// tb_vedic_ut_mul_nxn: checks that the column multiplier generalises to
// n x n operands.
//
// vedic_ut_mul is instantiated directly at 8 and 16 bits, without the
// nibble and byte split used by vedic_mul8 and vedic_mul16, and at 3 bits (a
// width that is not a power of two). The 3- and 8-bit instances are checked
// exhaustively, the 16-bit one on corner values and 50000 random pairs, all
// against the integer product. The multipliers are combinational: each result
// is checked one time step after its operands change.
module tb_vedic_ut_mul_nxn;

  logic [2:0]  a3, b3;
  logic [5:0]  p3;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic        clk;

  int checks   = 0;
  int failures = 0;

  localparam int NRAND = 50_000;

  vedic_ut_mul #(.WIDTH(3))  dut3  (.a(a3),  .b(b3),  .p(p3));
  vedic_ut_mul #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_ut_mul #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    @(negedge clk);
    a16 = x;
    b16 = y;
    #1;
    checks++;
    if (p16 !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL 16-bit %0d * %0d = %0d", x, y, p16);
    end
  endtask

  initial begin
    a3 = '0; b3 = '0; a16 = '0; b16 = '0;
    for (int unsigned x = 0; x < 8; x++)
      for (int unsigned y = 0; y < 8; y++) begin
        @(negedge clk);
        a3 = 3'(x);
        b3 = 3'(y);
        #1;
        checks++;
        if (p3 !== 6'(x * y)) begin
          failures++;
          $display("FAIL 3-bit %0d * %0d = %0d", x, y, p3);
        end
      end
    for (int unsigned x = 0; x < 256; x++)
      for (int unsigned y = 0; y < 256; y++) begin
        @(negedge clk);
        a8 = 8'(x);
        b8 = 8'(y);
        #1;
        checks++;
        if (p8 !== 16'(x * y)) begin
          failures++;
          $display("FAIL 8-bit %0d * %0d = %0d", x, y, p8);
        end
      end
    check16(16'hFFFF, 16'hFFFF);
    check16(16'd325, 16'd738);
    check16(16'h8000, 16'h8000);
    for (int n = 0; n < NRAND; n++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 70_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
