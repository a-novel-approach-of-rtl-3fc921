// mbe_last_row: the last partial-product row, already two's-complemented.
//
// In a plain MBE array the last row is stored in one's complement and its
// "+1" (neg) needs a row of its own. Here the row's magnitude
// X = 0, A or 2A (sign-extended to N+2 bits) is negated, when the group is
// negative, by the carry-free converter (twos_complement_converter), so the
// output t is the exact value factor * A and no neg bit is left over.
// t is N+2 bits wide because -2 x (-2^(N-1)) = 2^N needs them. In the array
// t[N-1:0] are the t bits, t[N] and ~t[N+1] the two sign bits at the top.
// The magnitude multiplexer is this design's choice. Combinational.
module mbe_last_row
  import mbe_pkg::*;
#(
  parameter int unsigned N = 8  // multiplicand width
) (
  input  logic [2:0]   b,  // {bN-1, bN-2, bN-3}
  input  logic [N-1:0] a,  // multiplicand
  output logic [N+1:0] t,  // factor * a, two's complement
  output logic         neg // group is negative (-A or -2A)
);

  booth_ctrl_t  ctrl;
  logic [N+1:0] mag;

  booth_encoder u_enc (.b(b), .ctrl(ctrl));

  always_comb begin
    unique case ({ctrl.two_n, ctrl.one_n})
      2'b10:   mag = {{2{a[N-1]}}, a};          // 1 x A
      2'b01:   mag = {a[N-1], a, 1'b0};         // 2 x A
      default: mag = '0;                        // 0
    endcase
    neg = ctrl.neg;
  end

  twos_complement_converter #(.W(N + 2)) u_conv (
    .x (mag),
    .en(ctrl.neg),
    .y (t)
  );

endmodule
