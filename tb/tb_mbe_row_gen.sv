// tb_mbe_row_gen: exhaustive test of one partial-product row (N = 8).
//
// For every triplet and every multiplicand the row {se, ppt_out}, read as a
// 9-bit two's-complement number, plus neg_cin must equal factor * y, with the
// factor (-2 .. 2) taken from the recoding table. Also checks that neg_cin is
// set exactly for -A and -2A.
module tb_mbe_row_gen;
  import mbe_pkg::*;

  localparam int unsigned N = 8;
  logic [2:0]   x;
  logic [N-1:0] y, ppt_out;
  logic         se, neg_cin;
  int checks = 0, failures = 0;

  mbe_row_gen #(.N(N)) dut (.x(x), .y(y), .ppt_out(ppt_out), .se(se), .neg_cin(neg_cin));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    booth_op_e op;
    int got, expv;
    for (int t = 0; t < 8; t++)
      for (int v = 0; v < (1 << N); v++) begin
        x = 3'(t);
        y = N'(v);
        #1ns;
        op   = booth_op_of(x);
        expv = booth_factor(op) * int'($signed(y));
        got  = int'($signed({se, ppt_out})) + int'(neg_cin);
        checks += 2;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("FAIL x=%b y=%0d row=%0d expected=%0d", x, $signed(y), got, expv);
        end
        if (neg_cin !== (op inside {OP_M1, OP_M2})) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
