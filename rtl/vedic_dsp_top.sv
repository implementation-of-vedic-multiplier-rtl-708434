// vedic_dsp_top: the Vedic multiplier designs side by side.
//
//  * A 2x2 matrix multiplier of 8-bit elements (mat_a x mat_b -> mat_c),
//    built from eight 8x8 Vedic multipliers, each of them four 4x4 Urdhava
//    Tiryakbhyam multipliers.
//  * A stand-alone 16x16 Vedic multiplier (mul_a * mul_b -> mul_p), built
//    from four 8x8 Vedic multipliers.
//
// The two units share nothing and have their own ports. Everything is
// combinational: outputs follow inputs after the propagation delay, with no
// clock or reset. Which units appear at the top is this design's choice; the
// units themselves are the ones the source design describes.
module vedic_dsp_top
  import vedic_pkg::*;
(
    input  elem_mat_t   mat_a,
    input  elem_mat_t   mat_b,
    output acc_mat_t    mat_c,
    input  logic [15:0] mul_a,
    input  logic [15:0] mul_b,
    output logic [31:0] mul_p
);

  vedic_matmul2x2 u_matmul (
      .a(mat_a),
      .b(mat_b),
      .c(mat_c)
  );

  vedic_mul16 u_mul16 (
      .a(mul_a),
      .b(mul_b),
      .p(mul_p)
  );

endmodule
