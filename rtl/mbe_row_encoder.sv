// mbe_row_encoder: the row encoder of the new MBE partial-product scheme.
//
// It takes the multiplier triplet x = {x2i+1, x2i, x2i-1} and the two end bits
// of the multiplicand (y_msb, y_lsb) and produces everything a row needs
// besides its middle bits:
//   ctrl.one_n, ctrl.two_n  the X1_b / X2_b selects (active low)
//   ctrl.neg                Neg, which conditions the multiplicand bits
//   z                       Z: the row is zero (+0 or -0)
//   neg_cin                 Neg_cin: the correction bit c_i = x2i+1 & ~(x2i & x2i-1)
//   row_lsb                 Row_LSB, the row's bit 0 (ppt_out[0])
//   na_lsb                  conditioned y_lsb, handed to the decoder of bit 1
//   se                      row sign bit (bit N of the N+1-bit row)
// Row_LSB takes a_-1 = 0, so for 2x it is 0 (+2A) or 1 (-2A).
// The sign is (y_msb ^ Neg) unless the row is zero. The port names follow the
// row-structure drawing; Z's exact use and the computation of se and of the
// conditioned LSB inside the encoder are this design's choices.
// Combinational.
module mbe_row_encoder
  import mbe_pkg::*;
(
  input  logic [2:0]  x,        // {x2i+1, x2i, x2i-1}
  input  logic        y_msb,    // multiplicand bit N-1
  input  logic        y_lsb,    // multiplicand bit 0
  output booth_ctrl_t ctrl,     // Neg, X1_b, X2_b
  output logic        z,        // Z: row is zero
  output logic        neg_cin,  // Neg_cin: correction bit c_i
  output logic        row_lsb,  // Row_LSB = ppt_out[0]
  output logic        na_lsb,   // ~(y_lsb ^ Neg), for the bit-1 decoder
  output logic        se        // row sign bit
);

  booth_encoder u_enc (.b(x), .ctrl(ctrl));

  logic na_m1;  // conditioned a_-1 (a_-1 = 0)

  always_comb begin
    z       = ctrl.one_n & ctrl.two_n;
    neg_cin = ctrl.neg;
    na_lsb  = ~(y_lsb ^ ctrl.neg);
    na_m1   = ~ctrl.neg;
    row_lsb = ~((ctrl.two_n | na_m1) & (ctrl.one_n | na_lsb));
    se      = ~z & (y_msb ^ ctrl.neg);
  end

endmodule
