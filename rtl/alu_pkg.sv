// alu_pkg - shared types and constants of the energy-aware 32-bit ALU.
//
// The ALU splits its 32-bit operands into four 8-bit lanes. Every lane
// executes one of sixteen instructions, selected by a 4-bit code, and returns
// a 16-bit result. This package holds the lane widths, the instruction
// encoding and the control word that the controlling unit hands to the lanes.
//
// The sixteen instructions (six arithmetic, ten logical) are the ones the
// design is specified with. Their numbering is this design's own choice: the
// arithmetic group first, then the logical group, each in its listed order.
package alu_pkg;

  localparam int unsigned LANE_W     = 8;   // width of one sub-ALU
  localparam int unsigned LANE_RES_W = 16;  // result width of one sub-ALU
  localparam int unsigned NUM_LANES  = 4;
  localparam int unsigned SEL_W      = 4;   // 16 instructions

  typedef logic [LANE_W-1:0]     lane_t;
  typedef logic [LANE_RES_W-1:0] lane_res_t;

  typedef enum logic [SEL_W-1:0] {
    OP_ADD  = 4'd0,   // a + b
    OP_SUB  = 4'd1,   // a - b, 16-bit two's complement
    OP_MUL  = 4'd2,   // a * b
    OP_DIV  = 4'd3,   // a / b
    OP_SQR  = 4'd4,   // a * a
    OP_MOD  = 4'd5,   // a % b
    OP_AND  = 4'd6,
    OP_OR   = 4'd7,
    OP_NOR  = 4'd8,
    OP_NAND = 4'd9,
    OP_XOR  = 4'd10,
    OP_XNOR = 4'd11,
    OP_NOT  = 4'd12,  // one's complement of a
    OP_NEG  = 4'd13,  // two's complement of a
    OP_SHR  = 4'd14,  // a >> b[2:0]
    OP_SHL  = 4'd15   // a << b[2:0], 16-bit result
  } alu_op_e;

  localparam int unsigned NUM_OPS = 2**SEL_W;

  typedef logic [NUM_OPS-1:0] op_onehot_t;

  // Control word from the controlling unit to the four lanes: the operation,
  // and the same operation as a one-hot select for the lanes' result
  // multiplexers.
  typedef struct packed {
    alu_op_e    op;
    op_onehot_t sel_oh;
  } alu_ctrl_t;

  // Zero-extends an 8-bit lane value to the 16-bit lane result.
  function automatic lane_res_t zext(input lane_t v);
    return {{(LANE_RES_W-LANE_W){1'b0}}, v};
  endfunction

  // AND-OR multiplexer: the candidate whose one-hot select bit is set.
  // All other candidates contribute zero.
  function automatic lane_res_t onehot_mux(
      input lane_res_t [NUM_OPS-1:0] cand,
      input op_onehot_t              oh);
    lane_res_t r = '0;
    for (int i = 0; i < NUM_OPS; i++) r |= cand[i] & {LANE_RES_W{oh[i]}};
    return r;
  endfunction

endpackage
