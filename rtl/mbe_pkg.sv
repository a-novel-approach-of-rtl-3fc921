// mbe_pkg: types shared by the modified-Booth (MBE) multiplier blocks.
//
// booth_ctrl_t bundles the three control signals a Booth encoder hands to the
// selectors of one partial-product row. one_n and two_n are active low, as in
// the encoder drawing this design follows; neg is active high and uses the
// "neg-first" coding, in which the group 111 (-0) gives neg = 0.
// booth_op_e names the six operations of the recoding table; it is used by
// the testbenches and by booth_op_of() to classify a multiplier triplet.
package mbe_pkg;

  typedef struct packed {
    logic neg;    // row is -A or -2A
    logic one_n;  // low: row selects 1 x A
    logic two_n;  // low: row selects 2 x A
  } booth_ctrl_t;

  typedef enum logic [2:0] {
    OP_P0  = 3'd0,  // 000: +0
    OP_P1  = 3'd1,  // 001, 010: +A
    OP_P2  = 3'd2,  // 011: +2A
    OP_M2  = 3'd3,  // 100: -2A
    OP_M1  = 3'd4,  // 101, 110: -A
    OP_M0  = 3'd5   // 111: -0
  } booth_op_e;

  // Operation selected by the triplet {b2i+1, b2i, b2i-1}.
  function automatic booth_op_e booth_op_of(input logic [2:0] trip);
    unique case (trip)
      3'b000:          return OP_P0;
      3'b001, 3'b010:  return OP_P1;
      3'b011:          return OP_P2;
      3'b100:          return OP_M2;
      3'b101, 3'b110:  return OP_M1;
      default:         return OP_M0;
    endcase
  endfunction

  // Multiplier factor (-2..2) of an operation.
  function automatic int booth_factor(input booth_op_e op);
    unique case (op)
      OP_P1:   return 1;
      OP_P2:   return 2;
      OP_M2:   return -2;
      OP_M1:   return -1;
      default: return 0;
    endcase
  endfunction

endpackage
