// tb_mbe_pp_array: exhaustive test of the regular partial-product array
// (N = 8, 4 rows of 16 bits).
//
// For every operand pair the sum of the rows modulo 2^16 must equal a * b.
// The shape of the array is checked too: row i may hold bits only from
// bit 2i-2 (its neg bit) upward, row 0 only below bit N+3, and neg[i] must be
// set exactly when group i is -A or -2A.
module tb_mbe_pp_array;
  import mbe_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned R = N / 2;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] rows [R];
  logic [R-1:0]   neg;
  int checks = 0, failures = 0;

  mbe_pp_array #(.N(N)) dut (.a(a), .b(b), .rows(rows), .neg(neg));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] sum;
    logic [N:0]     bx;
    logic [2*N-1:0] allowed;
    for (int ia = 0; ia < (1 << N); ia++)
      for (int ib = 0; ib < (1 << N); ib++) begin
        a = N'(ia);
        b = N'(ib);
        #1ns;
        sum = '0;
        for (int i = 0; i < R; i++) sum += rows[i];
        checks++;
        if (sum !== (2*N)'($signed(a) * $signed(b))) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d sum=%0d", $signed(a), $signed(b), $signed(sum));
        end
        bx = {b, 1'b0};
        for (int i = 0; i < R; i++) begin
          allowed = (i == 0) ? (2*N)'((1 << (N + 3)) - 1) : ~((2*N)'((1 << (2*i - 2)) - 1));
          checks += 2;
          if ((rows[i] & ~allowed) != 0) failures++;
          if (neg[i] !== (booth_op_of(bx[2*i +: 3]) inside {OP_M1, OP_M2})) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
