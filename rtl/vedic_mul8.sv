// vedic_mul8: unsigned 8x8-bit Vedic multiplier.
//
// The operands are split into nibbles, A = {X1, X0} and B = {Y1, Y0}. Four
// 4x4 Urdhava Tiryakbhyam multipliers form the cross products in parallel:
//   C = X0*Y0, D = X1*Y0 + X0*Y1, E = X1*Y1
// and vedic_combine adds them nibble column by nibble column into the 16-bit
// product {E + carry, D + (C >> 4), C[3:0]}.
//
// Interface: a (multiplier), b (multiplicand), p = a * b.
// Purely combinational: no clock, no registers, no handshake.
//
// The nibble split and the C/D/E terms follow the source design's 8x8
// algorithm; the exact way the three terms are added is this design's own.
module vedic_mul8 (
    input  logic [7:0]  a,
    input  logic [7:0]  b,
    output logic [15:0] p
);

  logic [7:0] pp_c, pp_d0, pp_d1, pp_e;

  vedic_ut_mul #(.WIDTH(4)) u_x0y0 (.a(a[3:0]), .b(b[3:0]), .p(pp_c));
  vedic_ut_mul #(.WIDTH(4)) u_x1y0 (.a(a[7:4]), .b(b[3:0]), .p(pp_d0));
  vedic_ut_mul #(.WIDTH(4)) u_x0y1 (.a(a[3:0]), .b(b[7:4]), .p(pp_d1));
  vedic_ut_mul #(.WIDTH(4)) u_x1y1 (.a(a[7:4]), .b(b[7:4]), .p(pp_e));

  vedic_combine #(.H(4)) u_combine (
      .c (pp_c),
      .d0(pp_d0),
      .d1(pp_d1),
      .e (pp_e),
      .p (p)
  );

endmodule
