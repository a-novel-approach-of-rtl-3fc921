// tb_twos_complement_converter: the carry-free negator against -x.
//
// A 10-bit instance is tested exhaustively for en = 0 and en = 1, and a
// 16-bit instance with 20,000 random words plus the worked example
// 001010 -> 110110 extended to 16 bits. Expected values come from the
// simulator's own subtraction 0 - x.
module tb_twos_complement_converter;
  logic [9:0]  x10, y10;
  logic [15:0] x16, y16;
  logic        en10, en16;
  int checks = 0, failures = 0;

  twos_complement_converter #(.W(10)) dut10 (.x(x10), .en(en10), .y(y10));
  twos_complement_converter #(.W(16)) dut16 (.x(x16), .en(en16), .y(y16));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x16 = 16'd0; en16 = 1'b0;
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 1024; v++) begin
        x10 = 10'(v); en10 = e[0];
        #1ns;
        checks++;
        if (y10 !== (en10 ? 10'(0 - v) : 10'(v))) begin
          failures++;
          if (failures < 10) $display("FAIL W=10 en=%b x=%b y=%b", en10, x10, y10);
        end
      end
    x16 = 16'b001010; en16 = 1'b1;
    #1ns;
    checks++;
    if (y16[5:0] !== 6'b110110 || y16 !== 16'hfff6) failures++;
    for (int k = 0; k < 20000; k++) begin
      x16 = 16'($urandom);
      en16 = 1'($urandom);
      #1ns;
      checks++;
      if (y16 !== (en16 ? 16'(16'd0 - x16) : x16)) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 en=%b x=%h y=%h", en16, x16, y16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
