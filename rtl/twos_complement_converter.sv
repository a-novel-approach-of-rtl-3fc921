// twos_complement_converter: negation without a ripple carry.
//
// The two's complement of x keeps every bit up to and including the
// rightmost 1 and inverts every bit above it. So y_j = x_j ^ (en & CS_j),
// where the conversion signal CS_j is 1 when any bit below j is 1.
// The CS are found by merging groups that double in size each level: in a
// pair of groups, the leftmost signal of the right (lower) group holds
// "a 1 was seen anywhere in my group" and, if it is 1, forces every signal of
// the left group to 1. With W bits this takes ceil(log2 W) OR levels
// (a Sklansky prefix-OR) instead of a W-long carry chain.
// en = 0 passes x unchanged. x = 0 and x = -2^(W-1) map to themselves, as in
// any W-bit negation. Combinational.
module twos_complement_converter #(
  parameter int unsigned W = 10  // word width
) (
  input  logic [W-1:0] x,
  input  logic         en,  // 1: y = -x, 0: y = x
  output logic [W-1:0] y
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  // seen[l][j]: a 1 appears in x at j or below, within j's group of 2^l bits.
  logic [W-1:0] seen [LEVELS+1];
  logic [W-1:0] cs;

  assign seen[0] = x;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar j = 0; j < W; j++) begin : g_bit
      // Bit j lies in the left half of its 2^(l+1) group when bit l of j is set;
      // it is then forced by the leftmost signal of the right half.
      if (((j >> l) & 1) == 1) begin : g_force
        localparam int unsigned SRC = ((j >> l) << l) - 1;
        assign seen[l+1][j] = seen[l][j] | seen[l][SRC];
      end else begin : g_keep
        assign seen[l+1][j] = seen[l][j];
      end
    end
  end

  always_comb begin
    cs = {seen[LEVELS][W-2:0], 1'b0};
    y  = x ^ ({W{en}} & cs);
  end

endmodule
