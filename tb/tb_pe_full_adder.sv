// tb_pe_full_adder: exhaustive test of the full adder: {cout, sout} must
// equal a + b + cin for all eight input combinations.
module tb_pe_full_adder;
  logic a, b, cin, sout, cout;
  int checks = 0, failures = 0;

  pe_full_adder dut (.a(a), .b(b), .cin(cin), .sout(sout), .cout(cout));

  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1ns;
      checks++;
      if ({cout, sout} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b sout=%b cout=%b", a, b, cin, sout, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
