// pe_full_adder: one-bit full adder, the cell of the carry-save reduction tree.
//
// It has two separate parts, as in the low-power adder it models: a sum block
// (sout = a ^ b ^ cin) and a carry block (cout = majority of a, b, cin). The
// transistor-level realisation (pseudo-NMOS stages with keepers) is what saves
// power in silicon; at the logic level only its Boolean function is kept here.
// Combinational.
module pe_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sout,
  output logic cout
);

  // Sum block.
  always_comb sout = a ^ b ^ cin;

  // Carry block.
  always_comb cout = (a & b) | (cin & (a | b));

endmodule
