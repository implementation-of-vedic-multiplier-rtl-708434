// vedic_ut_mul: unsigned WIDTH x WIDTH multiplier by the Urdhava Tiryakbhyam
// ("vertically and crosswise") rule.
//
// The product is formed one column at a time, from the least significant end.
// Column k adds every bit product a[i]&b[j] with i+j == k (the vertical and
// crosswise lines of the line diagram) to the carry left over from column
// k-1. The lowest bit of that sum is product bit r[k]; all the bits above it
// are the carry c[k] into the next column, which may be several bits wide.
// For the 4-bit default this is exactly
//   r0 = a0b0
//   c1r1 = a1b0 + a0b1
//   c2r2 = c1 + a2b0 + a1b1 + a0b2
//   c3r3 = c2 + a3b0 + a2b1 + a1b2 + a0b3
//   c4r4 = c3 + a3b1 + a2b2 + a1b3
//   c5r5 = c4 + a3b2 + a2b3
//   c6r6 = c5 + a3b3
// and the product is {c6, r6, ..., r0}. All bit products are formed in
// parallel by AND gates; one adder per column (2*WIDTH-2 of them after the
// first column) sums them with the incoming carry, so the delay is set by the
// carry rippling across the columns.
//
// Interface: a and b are the operands, p = a * b. Purely combinational: no
// clock, the product is valid one propagation delay after the operands.
//
// The equations and the column structure follow the source design; WIDTH is
// a parameter here (4 by default, the size drawn there) and the internal
// column-sum width is derived from it.
module vedic_ut_mul #(
    parameter int unsigned WIDTH = 4
) (
    input  logic [WIDTH-1:0]   a,
    input  logic [WIDTH-1:0]   b,
    output logic [2*WIDTH-1:0] p
);

  // A column sum never reaches 2*WIDTH: at most WIDTH bit products plus a
  // carry below WIDTH. One spare bit keeps the arithmetic obviously safe.
  localparam int unsigned CW   = $clog2(2 * WIDTH) + 1;
  localparam int unsigned NCOL = 2 * WIDTH - 1;

  // Column sums (carry in plus bit products) and the carries between them.
  // carry[k] is the carry into column k; carry[NCOL] is the final carry.
  logic [CW-1:0] col_sum [NCOL];
  logic [CW-1:0] carry   [NCOL+1];

  always_comb begin
    carry[0] = '0;
    for (int unsigned k = 0; k < NCOL; k++) begin
      col_sum[k] = carry[k];
      for (int unsigned i = 0; i < WIDTH; i++) begin
        for (int unsigned j = 0; j < WIDTH; j++) begin
          if (i + j == k) begin
            col_sum[k] = col_sum[k] + CW'(a[i] & b[j]);
          end
        end
      end
      p[k]       = col_sum[k][0];
      carry[k+1] = col_sum[k] >> 1;
    end
    // The last carry is the most significant product bit (c6 for 4 bits).
    p[2*WIDTH-1] = carry[NCOL][0];
  end

  // A WIDTH x WIDTH product fits 2*WIDTH bits, so the carry out of the last
  // column is a single bit.
  always_comb begin
    assert (carry[NCOL] <= CW'(1))
      else $error("vedic_ut_mul: final carry %0d wider than one bit", carry[NCOL]);
  end

endmodule
