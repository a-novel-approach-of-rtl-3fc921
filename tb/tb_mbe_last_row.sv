// tb_mbe_last_row: exhaustive test of the exact last row (N = 8).
//
// For every triplet and multiplicand the 10-bit output t must equal
// factor * a exactly (no separate +1), including 2^N for -2 x -2^(N-1).
module tb_mbe_last_row;
  import mbe_pkg::*;

  localparam int unsigned N = 8;
  logic [2:0]   b;
  logic [N-1:0] a;
  logic [N+1:0] t;
  logic         neg;
  int checks = 0, failures = 0;

  mbe_last_row #(.N(N)) dut (.b(b), .a(a), .t(t), .neg(neg));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    booth_op_e op;
    int expv;
    for (int k = 0; k < 8; k++)
      for (int v = 0; v < (1 << N); v++) begin
        b = 3'(k);
        a = N'(v);
        #1ns;
        op   = booth_op_of(b);
        expv = booth_factor(op) * int'($signed(a));
        checks += 2;
        if (int'($signed(t)) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL b=%b a=%0d t=%0d expected=%0d", b, $signed(a), $signed(t), expv);
        end
        if (neg !== (op inside {OP_M1, OP_M2})) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
