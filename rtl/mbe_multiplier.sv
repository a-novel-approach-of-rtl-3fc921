// mbe_multiplier: N x N two's-complement multiplier built on modified Booth
// encoding with a regular partial-product array.
//
// Three steps, all combinational:
//   1. mbe_pp_array recodes B in radix 4 and makes N/2 partial-product rows.
//      The last row is produced already negated by a carry-free two's
//      complement converter, so the usual extra row holding the last "+1"
//      (neg) bit does not exist: 4 rows instead of 5 for 8 x 8.
//   2. wallace_tree reduces the N/2 rows to two with rows of full adders.
//   3. cla_adder, a carry look-ahead adder, adds the two rows.
// product = a * b exactly (2N bits). There is no clock: the result is valid
// one combinational delay after a and b change; register the ports outside
// if a pipeline is wanted.
module mbe_multiplier #(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0]   a,        // multiplicand
  input  logic [N-1:0]   b,        // multiplier
  output logic [2*N-1:0] product   // a * b
);

  logic [2*N-1:0] rows [N/2];
  logic [2*N-1:0] sum_row, carry_row;
  logic           unused_cout;
  logic [N/2-1:0] unused_neg;

  mbe_pp_array #(.N(N)) u_ppa (
    .a   (a),
    .b   (b),
    .rows(rows),
    .neg (unused_neg)
  );

  wallace_tree #(.ROWS(N/2), .W(2*N)) u_wt (
    .in_rows  (rows),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  cla_adder #(.W(2*N), .GROUP(4)) u_cla (
    .x   (sum_row),
    .y   (carry_row),
    .cin (1'b0),
    .s   (product),
    .cout(unused_cout)
  );

endmodule
