// tb_wallace_tree: the carry-save reduction tree against a plain sum.
//
// Two instances: the default (4 rows of 16 bits, two levels) and one with
// 9 rows (four levels, with rows passed through unchanged). For random rows
// and a few all-ones patterns, sum_row + carry_row must equal the sum of the
// input rows modulo 2^W.
module tb_wallace_tree;
  localparam int unsigned W = 16;
  logic [W-1:0] r4 [4];
  logic [W-1:0] r9 [9];
  logic [W-1:0] s4, c4, s9, c9;
  int checks = 0, failures = 0;

  wallace_tree dut4 (.in_rows(r4), .sum_row(s4), .carry_row(c4));
  wallace_tree #(.ROWS(9), .W(W)) dut9 (.in_rows(r9), .sum_row(s9), .carry_row(c9));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e4, e9;
    for (int k = 0; k < 5000; k++) begin
      for (int i = 0; i < 4; i++) r4[i] = (k < 4) ? '1 : W'($urandom);
      for (int i = 0; i < 9; i++) r9[i] = (k < 4) ? '1 : W'($urandom);
      #1ns;
      e4 = '0; e9 = '0;
      for (int i = 0; i < 4; i++) e4 += r4[i];
      for (int i = 0; i < 9; i++) e9 += r9[i];
      checks += 2;
      if (W'(s4 + c4) !== e4) begin
        failures++;
        if (failures < 10) $display("FAIL 4 rows: %h + %h != %h", s4, c4, e4);
      end
      if (W'(s9 + c9) !== e9) begin
        failures++;
        if (failures < 10) $display("FAIL 9 rows: %h + %h != %h", s9, c9, e9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
