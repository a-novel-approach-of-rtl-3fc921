// booth_encoder: radix-4 modified Booth (MBE) encoder for one multiplier group.
//
// Input b = {b2i+1, b2i, b2i-1}. Outputs follow the recoding table of the
// design (neg/two/one, "neg-first" variant):
//   neg   = b2i+1 & ~(b2i & b2i-1)     (also the row's correction bit c_i)
//   one_n = ~(b2i ^ b2i-1)             (low when the row is +-1 x A)
//   two_n = low for 011 and 100        (row is +-2 x A)
// The group 111 is "-0": neg = 0, so the row is all zeros with no correction.
// Signal names and the active-low one/two outputs follow the encoder drawing;
// the logic is written from the recoding table. Purely combinational.
module booth_encoder
  import mbe_pkg::*;
(
  input  logic [2:0]  b,     // {b2i+1, b2i, b2i-1}
  output booth_ctrl_t ctrl
);

  logic b_hi, b_mid, b_lo;
  assign {b_hi, b_mid, b_lo} = b;

  always_comb begin
    ctrl.neg   = b_hi & ~(b_mid & b_lo);
    ctrl.one_n = ~(b_mid ^ b_lo);
    ctrl.two_n = ~((b_hi & ~b_mid & ~b_lo) | (~b_hi & b_mid & b_lo));
  end

endmodule
