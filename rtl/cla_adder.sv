// cla_adder: two-level carry look-ahead adder for the final two rows.
//
// Bits are split into groups of GROUP. Each bit has generate g = x & y and
// propagate p = x ^ y. Each group forms its group generate and propagate
// (G, P); a look-ahead unit computes every group's carry-in directly from
// cin and the (G, P) of the groups below it, and inside a group every carry
// is again a direct sum of products of the bit g/p and the group carry-in.
// No carry ripples from bit to bit. s = x + y + cin, cout is the carry out
// of bit W-1. W must be a multiple of GROUP. Combinational.
module cla_adder #(
  parameter int unsigned W     = 16,  // word width
  parameter int unsigned GROUP = 4    // bits per look-ahead group
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = W / GROUP;

  initial begin
    assert (W % GROUP == 0) else $error("cla_adder: W must be a multiple of GROUP");
  end

  logic [W-1:0]  g, p, c;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;   // gc[k]: carry into group k; gc[NG] = cout

  always_comb begin
    g = x & y;
    p = x ^ y;

    // Group generate / propagate.
    for (int k = 0; k < NG; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int m = 0; m < GROUP; m++) begin
        gg[k] = g[k*GROUP + m] | (p[k*GROUP + m] & gg[k]);
        gp[k] = gp[k] & p[k*GROUP + m];
      end
    end

    // Look-ahead unit: gc[k] = OR over j<k of (gg[j] & gp[j+1..k-1]) | (cin & gp[0..k-1]).
    for (int k = 0; k <= NG; k++) begin
      logic term;
      gc[k] = cin;
      for (int j = 0; j < k; j++) gc[k] = gc[k] & gp[j];
      for (int j = 0; j < k; j++) begin
        term = gg[j];
        for (int q = j + 1; q < k; q++) term = term & gp[q];
        gc[k] = gc[k] | term;
      end
    end

    // Carries inside each group, from the group carry-in.
    for (int k = 0; k < NG; k++) begin
      for (int m = 0; m < GROUP; m++) begin
        logic cc, tm;
        cc = gc[k];
        for (int q = 0; q < m; q++) cc = cc & p[k*GROUP + q];
        for (int jj = 0; jj < m; jj++) begin
          tm = g[k*GROUP + jj];
          for (int q = jj + 1; q < m; q++) tm = tm & p[k*GROUP + q];
          cc = cc | tm;
        end
        c[k*GROUP + m] = cc;
      end
    end

    s    = p ^ c;
    cout = gc[NG];
  end

endmodule
