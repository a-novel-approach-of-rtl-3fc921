// tb_cla_adder: the carry look-ahead adder against x + y + cin.
//
// The default 16-bit adder gets 50,000 random operand pairs with random
// carry-in, plus edge cases whose carry runs the whole width (ffff + 0 + 1,
// ffff + ffff + 1, 8000 + 8000). {cout, s} must equal the 17-bit sum.
module tb_cla_adder;
  localparam int unsigned W = 16;
  logic [W-1:0] x, y, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] xi, yi, input logic ci);
    logic [W:0] e;
    x = xi; y = yi; cin = ci;
    #1ns;
    e = {1'b0, xi} + {1'b0, yi} + (W+1)'(ci);
    checks++;
    if ({cout, s} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %b_%h", xi, yi, ci, cout, s);
    end
  endtask

  initial begin
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one(16'h8000, 16'h8000, 1'b0);
    check_one(16'h0fff, 16'h0001, 1'b0);
    for (int k = 0; k < 50000; k++) check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
