// tb_booth_encoder: exhaustive test of the MBE encoder against the recoding
// table. For each of the 8 triplets the expected neg, one and two are written
// out as table rows here, not derived from the encoder's equations.
module tb_booth_encoder;
  import mbe_pkg::*;

  logic [2:0]  b;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;

  // {neg, two, one} per triplet 000 .. 111 (active-high two/one).
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b001, 3'b001, 3'b010,
                                        3'b110, 3'b101, 3'b101, 3'b000};

  booth_encoder dut (.b(b), .ctrl(ctrl));

  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      b = 3'(t);
      #1ns;
      checks++;
      if ({ctrl.neg, ~ctrl.two_n, ~ctrl.one_n} !== TABLE[t]) begin
        failures++;
        $display("FAIL b=%b neg=%b one_n=%b two_n=%b", b, ctrl.neg, ctrl.one_n, ctrl.two_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
