// vedic_combine: joins the four half-width products of a 2H x 2H Vedic
// multiplication into the full product.
//
// The operands are split into halves, A = {X1, X0} and B = {Y1, Y0}, and the
// caller supplies the cross products
//   c  = X0 * Y0        (vertical, low half)
//   d0 = X1 * Y0, d1 = X0 * Y1   (crosswise)
//   e  = X1 * Y1        (vertical, high half)
// They are then added column by column in base 2^H, the same rule as the
// bit-level Urdhava Tiryakbhyam multiplier applied to digits of H bits:
//   digit 0            = low H bits of c
//   {carry1, digit 1}  = d0 + d1 + (c >> H)
//   {digit 3, digit 2} = e + carry1
// and the product is {digit 3, digit 2, digit 1, digit 0}.
//
// Interface: c, d0, d1, e are 2H-bit products, p is the 4H-bit result.
// Purely combinational.
//
// The split into C, D and E follows the source design's algorithm for 8x8
// multiplication; the digit-wise carry handling shown here is this design's
// reading of how the three terms are added.
module vedic_combine #(
    parameter int unsigned H = 4
) (
    input  logic [2*H-1:0] c,
    input  logic [2*H-1:0] d0,
    input  logic [2*H-1:0] d1,
    input  logic [2*H-1:0] e,
    output logic [4*H-1:0] p
);

  // d0 + d1 needs 2H+1 bits; adding the upper half of c needs one more.
  logic [2*H+1:0] mid;
  logic [2*H-1:0] upper;

  always_comb begin
    mid   = (2*H+2)'(d0) + (2*H+2)'(d1) + (2*H+2)'(c[2*H-1:H]);
    upper = e + (2*H)'(mid[2*H+1:H]);
    p     = {upper, mid[H-1:0], c[H-1:0]};
  end

  // For genuine sub-products the high half never overflows: the result is a
  // product of two 2H-bit numbers and fits 4H bits.
  always_comb begin
    assert ((2*H+1)'(e) + (2*H+1)'(mid[2*H+1:H]) < (2*H+1)'(1) << (2*H))
      else $error("vedic_combine: high half overflows");
  end

endmodule
