// tb_mbe_row_encoder: exhaustive test of the row encoder.
//
// For every triplet and both values of y_msb and y_lsb the expected outputs
// follow from the operation of the triplet (table of booth_op_of): zero flag
// for +0/-0, Neg_cin for -A/-2A, the row's bit 0 (y_lsb for +A, its inverse
// for -A, 0 for +2A, 1 for -2A, 0 otherwise) and the row's sign bit
// (y_msb, inverted for negative rows, 0 for zero rows), and the select
// signals Neg, X1_b and X2_b.
module tb_mbe_row_encoder;
  import mbe_pkg::*;

  logic [2:0]  x;
  logic        y_msb, y_lsb;
  booth_ctrl_t ctrl;
  logic        z, neg_cin, row_lsb, na_lsb, se;
  int checks = 0, failures = 0;

  mbe_row_encoder dut (.x(x), .y_msb(y_msb), .y_lsb(y_lsb), .ctrl(ctrl), .z(z),
                       .neg_cin(neg_cin), .row_lsb(row_lsb), .na_lsb(na_lsb), .se(se));

  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    booth_op_e op;
    logic e_z, e_neg, e_lsb, e_se;
    for (int v = 0; v < 32; v++) begin
      {x, y_msb, y_lsb} = 5'(v);
      #1ns;
      op    = booth_op_of(x);
      e_z   = op inside {OP_P0, OP_M0};
      e_neg = op inside {OP_M1, OP_M2};
      unique case (op)
        OP_P1:   e_lsb = y_lsb;
        OP_M1:   e_lsb = ~y_lsb;
        OP_M2:   e_lsb = 1'b1;
        default: e_lsb = 1'b0;
      endcase
      e_se = e_z ? 1'b0 : (y_msb ^ e_neg);
      checks += 6;
      if ({ctrl.neg, ctrl.one_n, ctrl.two_n} !== {e_neg, ~(op inside {OP_P1, OP_M1}), ~(op inside {OP_P2, OP_M2})}) begin
        failures++; $display("FAIL ctrl x=%b", x);
      end
      if (z !== e_z)             begin failures++; $display("FAIL z x=%b", x); end
      if (neg_cin !== e_neg)     begin failures++; $display("FAIL neg_cin x=%b", x); end
      if (row_lsb !== e_lsb)     begin failures++; $display("FAIL row_lsb x=%b ylsb=%b", x, y_lsb); end
      if (se !== e_se)           begin failures++; $display("FAIL se x=%b ymsb=%b", x, y_msb); end
      if (na_lsb !== ~(y_lsb ^ e_neg)) begin failures++; $display("FAIL na_lsb x=%b", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
