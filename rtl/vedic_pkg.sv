// vedic_pkg: sizes and types shared by the Vedic multiplier blocks and the
// 2x2 matrix multiplier built on them.
//
// The matrix unit works on unsigned 8-bit elements, the width of the 8x8
// Vedic multiplier it is built from. Each entry of the result is the sum of
// two 16-bit products, so it is kept at 17 bits and never overflows; that
// extra bit is a choice of this design.
package vedic_pkg;

  // Element width of the matrix operands (width of the 8x8 multiplier).
  parameter int unsigned ELEM_W = 8;
  // Width of one product of two elements.
  parameter int unsigned PROD_W = 2 * ELEM_W;
  // Width of a dot product of length 2: one bit more than a product.
  parameter int unsigned ACC_W  = PROD_W + 1;
  // Matrix order.
  parameter int unsigned DIM    = 2;

  typedef logic [ELEM_W-1:0] elem_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [ACC_W-1:0]  acc_t;

  // DIM x DIM matrices, indexed [row][column].
  typedef elem_t elem_mat_t [DIM][DIM];
  typedef acc_t  acc_mat_t  [DIM][DIM];

endpackage
