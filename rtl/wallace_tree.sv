// wallace_tree: carry-save reduction of ROWS rows to two.
//
// Each level takes the rows three at a time and adds each triple with a row
// of full adders (pe_full_adder): the sums stay in place and the carries move
// one bit left, so three rows become two. Rows left over (one or two) pass to
// the next level unchanged. Levels repeat until two rows remain: 4 rows need
// two levels, 6 need three, 9 need four. All arithmetic is modulo 2^W; a
// carry out of bit W-1 is dropped, which is exact when the final sum is known
// to fit in W bits (as a product does). Combinational.
// sum_row + carry_row = sum of in_rows (mod 2^W).
module wallace_tree #(
  parameter int unsigned ROWS = 4,   // rows in
  parameter int unsigned W    = 16   // row width
) (
  input  logic [W-1:0] in_rows [ROWS],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);

  // Rows present after reduction level l.
  function automatic int unsigned rows_at(input int unsigned l);
    int unsigned r = ROWS;
    for (int unsigned k = 0; k < l; k++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned r = ROWS;
    int unsigned n = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      n++;
    end
    return n;
  endfunction

  localparam int unsigned NLEV = num_levels();

  initial begin
    assert (ROWS >= 2) else $error("wallace_tree: ROWS must be at least 2");
  end

  // Level l reads rows_in (level l-1's rows_out, or the inputs) and drives
  // rows_out; each level is its own generate scope.
  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int unsigned RIN  = rows_at(l);
    localparam int unsigned G    = RIN / 3;
    localparam int unsigned ROUT = rows_at(l + 1);

    logic [W-1:0] rows_in  [RIN];
    logic [W-1:0] rows_out [ROUT];

    for (genvar r = 0; r < RIN; r++) begin : g_in
      if (l == 0) begin : g_first
        assign rows_in[r] = in_rows[r];
      end else begin : g_next
        assign rows_in[r] = g_lvl[l-1].rows_out[r];
      end
    end

    for (genvar g = 0; g < G; g++) begin : g_csa
      logic [W-1:0] s;
      logic [W-1:0] c;   // c[j]: carry of bit j-1; c[0] = 0
      logic         unused_carry_msb;
      assign c[0] = 1'b0;
      for (genvar j = 0; j < W; j++) begin : g_fa
        if (j < W - 1) begin : g_mid
          pe_full_adder u_fa (
            .a   (rows_in[3*g][j]),
            .b   (rows_in[3*g+1][j]),
            .cin (rows_in[3*g+2][j]),
            .sout(s[j]),
            .cout(c[j+1])
          );
        end else begin : g_msb
          pe_full_adder u_fa (
            .a   (rows_in[3*g][j]),
            .b   (rows_in[3*g+1][j]),
            .cin (rows_in[3*g+2][j]),
            .sout(s[j]),
            .cout(unused_carry_msb)
          );
        end
      end
      assign rows_out[2*g]   = s;
      assign rows_out[2*g+1] = c;
    end

    for (genvar r = 3 * G; r < RIN; r++) begin : g_pass
      assign rows_out[2*G + r - 3*G] = rows_in[r];
    end
  end

  if (NLEV == 0) begin : g_none
    assign sum_row   = in_rows[0];
    assign carry_row = in_rows[1];
  end else begin : g_out
    assign sum_row   = g_lvl[NLEV-1].rows_out[0];
    assign carry_row = g_lvl[NLEV-1].rows_out[1];
  end

endmodule
