// tb_mbe_multiplier: end-to-end test of the 8 x 8 MBE multiplier.
//
// Applies every one of the 65,536 operand pairs at the default width and
// compares the product with a * b computed by the simulator on signed
// integers. It also counts how often each mechanism of the design is used:
// every Booth operation (+0, +A, +2A, -2A, -A, -0) in every row (row 0,
// whose b-1 is 0, has no +2A and no -0), the last row
// negated by the carry-free converter, and the one case whose last row needs
// all N+2 bits (-2 x -2^(N-1)). A mechanism never seen counts as a failure.
// The multiplier is combinational: each result is checked 1 ns after the
// operands change. A watchdog ends the run if it stalls.
module tb_mbe_multiplier;
  import mbe_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned R = N / 2;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] product;

  int checks   = 0;
  int failures = 0;
  int op_count [R][6];
  int last_neg_count = 0;
  int wide_last_count = 0;

  mbe_multiplier dut (.a(a), .b(b), .product(product));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog: simulation stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] bx;
    int         expected;
    booth_op_e  op;

    foreach (op_count[i, k]) op_count[i][k] = 0;

    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        a = N'(ia);
        b = N'(ib);
        #1ns;
        expected = $signed(a) * $signed(b);
        checks++;
        if (product !== (2*N)'(expected)) begin
          failures++;
          if (failures <= 10)
            $display("FAIL a=%0d b=%0d product=%0d expected=%0d",
                     $signed(a), $signed(b), $signed(product), expected);
        end
        bx = {b, 1'b0};
        for (int i = 0; i < R; i++) begin
          op = booth_op_of(bx[2*i +: 3]);
          op_count[i][op]++;
        end
        if (booth_op_of(bx[N -: 3]) inside {OP_M1, OP_M2} && a != 0) last_neg_count++;
        if (booth_op_of(bx[N -: 3]) == OP_M2 && a == {1'b1, {(N-1){1'b0}}}) wide_last_count++;
      end
    end

    for (int i = 0; i < R; i++) begin
      for (int k = 0; k < 6; k++) begin
        // Row 0 has b-1 = 0, so it can never see 011 (+2A) or 111 (-0).
        if (i == 0 && booth_op_e'(k) inside {OP_P2, OP_M0}) continue;
        checks++;
        if (op_count[i][k] == 0) begin
          failures++;
          $display("FAIL row %0d never used operation %s", i, booth_op_e'(k));
        end
      end
    end
    $display("last row negated by the converter: %0d times", last_neg_count);
    $display("last row needing N+2 bits: %0d times", wide_last_count);
    checks += 2;
    if (last_neg_count == 0) failures++;
    if (wide_last_count == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
