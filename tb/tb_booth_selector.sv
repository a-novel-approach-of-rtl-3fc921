// tb_booth_selector: exhaustive test of one Booth selector bit.
//
// For every combination of select (one, two, none), a_j, a_j-1 and b2i+1 the
// expected bit is taken from the recoding table: a_j for 1x, a_j-1 for 2x,
// inverted when b2i+1 = 1, and 0 when neither select is on. The neighbour's
// conditioned bit na_j-1 is formed here as ~(a_j-1 ^ b2i+1); na_j is checked
// against the same rule.
module tb_booth_selector;
  logic two_n, one_n, a_j, b_msb, na_jm1, na_j, p;
  int checks = 0, failures = 0;

  booth_selector dut (.two_n(two_n), .one_n(one_n), .a_j(a_j), .b_msb(b_msb),
                      .na_jm1(na_jm1), .na_j(na_j), .p(p));

  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a_jm1, exp_p;
    for (int sel = 0; sel < 3; sel++)          // 0: none, 1: one, 2: two
      for (int v = 0; v < 8; v++) begin
        {a_j, a_jm1, b_msb} = 3'(v);
        one_n  = (sel != 1);
        two_n  = (sel != 2);
        na_jm1 = ~(a_jm1 ^ b_msb);
        #1ns;
        case (sel)
          1:       exp_p = b_msb ? ~a_j   : a_j;
          2:       exp_p = b_msb ? ~a_jm1 : a_jm1;
          default: exp_p = 1'b0;
        endcase
        checks += 2;
        if (p !== exp_p) begin
          failures++;
          $display("FAIL sel=%0d a_j=%b a_j-1=%b b=%b p=%b", sel, a_j, a_jm1, b_msb, p);
        end
        if (na_j !== ~(a_j ^ b_msb)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
