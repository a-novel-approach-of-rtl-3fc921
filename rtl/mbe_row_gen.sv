// mbe_row_gen: one partial-product row of the new MBE scheme.
//
// Structure: a row encoder (mbe_row_encoder) turns the multiplier triplet into
// the select signals; N-1 decoders (booth_selector, each with its XNOR that
// conditions one multiplicand bit with Neg) give ppt_out[N-1:1]; the encoder
// itself gives ppt_out[0] (Row_LSB), the sign bit se and the correction bit
// Neg_cin. The decoders are chained: decoder j takes the conditioned bit j-1
// of its right neighbour, decoder 1 takes the one from the encoder.
//
// The row is the one's complement of +-{0, A, 2A} when negative; its value is
//   {se, ppt_out} (N+1-bit two's complement) + neg_cin = factor * y.
// Feeding Neg rather than x2i+1 to the XNORs follows the row-structure
// drawing; it differs only for -0, where both selects are off anyway.
// Combinational.
module mbe_row_gen
  import mbe_pkg::*;
#(
  parameter int unsigned N = 8   // multiplicand width
) (
  input  logic [2:0]   x,        // {x2i+1, x2i, x2i-1}
  input  logic [N-1:0] y,        // multiplicand
  output logic [N-1:0] ppt_out,  // row bits p_i(N-1) .. p_i0
  output logic         se,       // row sign bit p_iN
  output logic         neg_cin   // correction bit c_i (= neg_i)
);

  booth_ctrl_t ctrl;
  logic [N-2:0] na;  // na[j]: multiplicand bit j conditioned by Neg (inverted)
  logic         unused_z;  // Z: zero row; the encoder already uses it for se
  logic         unused_na_msb;

  mbe_row_encoder u_renc (
    .x      (x),
    .y_msb  (y[N-1]),
    .y_lsb  (y[0]),
    .ctrl   (ctrl),
    .z      (unused_z),
    .neg_cin(neg_cin),
    .row_lsb(ppt_out[0]),
    .na_lsb (na[0]),
    .se     (se)
  );

  for (genvar j = 1; j < N; j++) begin : g_dec
    logic na_j;
    booth_selector u_dec (
      .two_n (ctrl.two_n),
      .one_n (ctrl.one_n),
      .a_j   (y[j]),
      .b_msb (ctrl.neg),
      .na_jm1(na[j-1]),
      .na_j  (na_j),
      .p     (ppt_out[j])
    );
    if (j < N - 1) begin : g_chain
      assign na[j] = na_j;
    end else begin : g_end
      assign unused_na_msb = na_j;
    end
  end

endmodule
