// booth_selector: one partial-product bit p_ij of a modified-Booth row.
//
// The multiplicand bit is first conditioned by the sign of the group:
// na_j = ~(a_j ^ b2i+1), i.e. the inverse of the bit the row needs, taken
// before the 1x/2x choice ("neg-first"). The selector then picks
//   p_ij = ~((two_n | na_j-1) & (one_n | na_j))
// which gives a_j (+A), a_j-1 (+2A), ~a_j (-A), ~a_j-1 (-2A) or 0 as in the
// recoding table. When both one_n and two_n are high (+0 and -0) the bit is 0
// whatever b2i+1 is. na_j is exported so that the neighbouring selector
// (bit j+1) can use it as its na_j-1. Combinational.
module booth_selector (
  input  logic two_n,   // active-low 2 x A select
  input  logic one_n,   // active-low 1 x A select
  input  logic a_j,     // multiplicand bit j
  input  logic b_msb,   // b2i+1, sign of the group
  input  logic na_jm1,  // conditioned bit j-1 from the neighbour
  output logic na_j,    // conditioned bit j, to the neighbour
  output logic p        // partial-product bit p_ij
);

  always_comb begin
    na_j = ~(a_j ^ b_msb);
    p    = ~((two_n | na_jm1) & (one_n | na_j));
  end

endmodule
