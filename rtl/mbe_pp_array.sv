// mbe_pp_array: the regular N/2-row partial-product array of the multiplier.
//
// For N x N two's-complement operands (N even, N >= 6) the radix-4 Booth
// recoding gives N/2 rows. Row i (group {b2i+1, b2i, b2i-1}, b-1 = 0) starts at
// bit 2i. The usual MBE array needs an extra, (N/2+1)-th row for the last
// neg bit; this array does not:
//   row 0        : ~s0 s0 s0 p0[N-1:0]                      at bits N+2 .. 0
//   row i (mid)  : 1 ~si pi[N-1:0]   and neg(i-1) at bit 2i-2
//   row N/2-2    : 1 1 ~si pi[N-1:0] and neg(i-1) at bit 2i-2
//   row N/2-1    : ~t(N+1) t[N:0]    and neg(N/2-2) at bit N-4
// where pi is a one's-complement Booth row (mbe_row_gen), si its sign and t
// the exact two's-complement last row (mbe_last_row). The constant 1s replace
// the sign extension of every row; the extra 1 in row N/2-2 and the inverted
// top bit of the last row complete that constant because the last row is
// already exact. The sum of all rows modulo 2^(2N) is the product.
// Output rows are 2N bits wide and aligned to product bit positions; empty
// positions are 0. Combinational.
module mbe_pp_array
  import mbe_pkg::*;
#(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0]   a,                // multiplicand
  input  logic [N-1:0]   b,                // multiplier
  output logic [2*N-1:0] rows [N/2],       // partial-product rows
  output logic [N/2-1:0] neg               // neg_i of every row (row i is -A or -2A)
);

  localparam int unsigned R = N / 2;       // number of rows
  localparam int unsigned K = R - 1;       // rows made by mbe_row_gen

  initial begin
    assert (N >= 6 && N % 2 == 0)
      else $error("mbe_pp_array: N must be even and at least 6");
  end

  logic [N:0]   bx;                        // {b, b-1 = 0}
  logic [N-1:0] ppt [K];
  logic [K-1:0] se, negc;
  logic [N+1:0] t;
  logic         neg_last;

  assign bx  = {b, 1'b0};
  assign neg = {neg_last, negc};

  for (genvar i = 0; i < K; i++) begin : g_row
    mbe_row_gen #(.N(N)) u_row (
      .x      (bx[2*i+2 -: 3]),
      .y      (a),
      .ppt_out(ppt[i]),
      .se     (se[i]),
      .neg_cin(negc[i])
    );
  end

  mbe_last_row #(.N(N)) u_last (
    .b  (bx[N -: 3]),
    .a  (a),
    .t  (t),
    .neg(neg_last)
  );

  always_comb begin
    for (int i = 0; i < R; i++) rows[i] = '0;

    // Row 0.
    rows[0][N-1:0] = ppt[0];
    rows[0][N]     = se[0];
    rows[0][N+1]   = se[0];
    rows[0][N+2]   = ~se[0];

    // Middle rows.
    for (int i = 1; i < K; i++) begin
      rows[i][2*i +: N]    = ppt[i];
      rows[i][2*i + N]     = ~se[i];
      rows[i][2*i + N + 1] = 1'b1;
      rows[i][2*i - 2]     = negc[i-1];
    end
    rows[K-1][2*(K-1) + N + 2] = 1'b1;

    // Last row, exact two's complement.
    rows[K][2*K +: N+1]   = t[N:0];
    rows[K][2*N - 1]      = ~t[N+1];
    rows[K][2*K - 2]      = negc[K-1];
  end

endmodule
