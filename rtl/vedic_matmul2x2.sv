// vedic_matmul2x2: product of two 2x2 matrices of unsigned 8-bit elements,
// C = A x B, built from 8x8 Vedic multipliers.
//
// Each of the four result entries is a dot product of length two,
//   C[i][j] = A[i][0]*B[0][j] + A[i][1]*B[1][j],
// so the unit holds eight vedic_mul8 instances, all working in parallel, and
// four adders. Entries are returned at 17 bits (ACC_W), wide enough for the
// largest sum, 2 * 255 * 255.
//
// Interface: a and b are indexed [row][column]; c likewise.
// Purely combinational: the result follows the operands after one
// multiplier delay plus one adder delay.
//
// Using the Vedic multiplier for a 2x2 matrix product follows the source
// design. The element width, the full-width results and the one-multiplier-
// per-product arrangement are this design's choices.
module vedic_matmul2x2
  import vedic_pkg::*;
(
    input  elem_mat_t a,
    input  elem_mat_t b,
    output acc_mat_t  c
);

  // prod[i][j][k] = a[i][k] * b[k][j]
  prod_t prod [DIM][DIM][DIM];

  for (genvar i = 0; i < DIM; i++) begin : g_row
    for (genvar j = 0; j < DIM; j++) begin : g_col
      for (genvar k = 0; k < DIM; k++) begin : g_term
        vedic_mul8 u_mul (
            .a(a[i][k]),
            .b(b[k][j]),
            .p(prod[i][j][k])
        );
      end
      assign c[i][j] = ACC_W'(prod[i][j][0]) + ACC_W'(prod[i][j][1]);
    end
  end

endmodule
