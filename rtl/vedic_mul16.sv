// vedic_mul16: unsigned 16x16-bit Vedic multiplier.
//
// The same vertically-and-crosswise split as the 8x8 multiplier, one level
// up: A = {X1, X0} and B = {Y1, Y0} with 8-bit halves, four 8x8 Vedic
// multipliers form X0*Y0, X1*Y0, X0*Y1 and X1*Y1 in parallel, and
// vedic_combine adds them byte column by byte column into the 32-bit product.
// Each 8x8 multiplier is itself four 4x4 Urdhava Tiryakbhyam multipliers, so
// the whole unit holds sixteen of them.
//
// Interface: a (multiplier), b (multiplicand), p = a * b.
// Purely combinational.
//
// A 16-bit Vedic multiplier is part of the source design; that it is built
// hierarchically from four 8x8 multipliers is this design's reading of how
// the 8x8 algorithm generalises to larger operands.
module vedic_mul16 (
    input  logic [15:0] a,
    input  logic [15:0] b,
    output logic [31:0] p
);

  logic [15:0] pp_c, pp_d0, pp_d1, pp_e;

  vedic_mul8 u_x0y0 (.a(a[7:0]),  .b(b[7:0]),  .p(pp_c));
  vedic_mul8 u_x1y0 (.a(a[15:8]), .b(b[7:0]),  .p(pp_d0));
  vedic_mul8 u_x0y1 (.a(a[7:0]),  .b(b[15:8]), .p(pp_d1));
  vedic_mul8 u_x1y1 (.a(a[15:8]), .b(b[15:8]), .p(pp_e));

  vedic_combine #(.H(8)) u_combine (
      .c (pp_c),
      .d0(pp_d0),
      .d1(pp_d1),
      .e (pp_e),
      .p (p)
  );

endmodule
