// alu8_semi_accurate - semi-accurate 8-bit sub-ALU (lane 3 of the 32-bit ALU).
//
// All ten logical instructions and add, subtract, divide and modulus are
// exact, as in alu8_accurate. Multiply and square are approximate: the four
// least significant bits of both operands are truncated (taken as zero), so
// the product comes from a 4x4 multiplier on the upper nibbles, shifted left
// by eight. The error of a truncated product is below (a + b) * 16.
//
// Truncating four low bits of approximate operations is part of the design's
// specification; which arithmetic instructions are approximate in this lane
// (multiply and square, the two largest units) is this design's own choice.
//
// Interface: a, b, ctrl in; y out (16 bits). Purely combinational. An
// assertion checks that ctrl's one-hot select matches its operation code.
// Result formats are those of alu8_accurate.
module alu8_semi_accurate
  import alu_pkg::*;
#(
  parameter int unsigned TRUNC_BITS = 4
) (
  input  lane_t     a,
  input  lane_t     b,
  input  alu_ctrl_t ctrl,
  output lane_res_t y
);

  localparam int unsigned HI_W = LANE_W - TRUNC_BITS;

  // Upper bits that survive truncation.
  logic [HI_W-1:0] a_hi, b_hi;
  assign a_hi = a[LANE_W-1:TRUNC_BITS];
  assign b_hi = b[LANE_W-1:TRUNC_BITS];

  lane_res_t [NUM_OPS-1:0] cand;

  always_comb begin
    cand          = '0;
    cand[OP_ADD]  = lane_res_t'(a) + lane_res_t'(b);
    cand[OP_SUB]  = lane_res_t'(a) - lane_res_t'(b);
    cand[OP_MUL]  = (lane_res_t'(a_hi) * lane_res_t'(b_hi)) << (2 * TRUNC_BITS);
    cand[OP_DIV]  = (b == '0) ? zext('1) : zext(a / b);
    cand[OP_SQR]  = (lane_res_t'(a_hi) * lane_res_t'(a_hi)) << (2 * TRUNC_BITS);
    cand[OP_MOD]  = (b == '0) ? lane_res_t'(a) : zext(a % b);
    cand[OP_AND]  = zext(a & b);
    cand[OP_OR]   = zext(a | b);
    cand[OP_NOR]  = zext(~(a | b));
    cand[OP_NAND] = zext(~(a & b));
    cand[OP_XOR]  = zext(a ^ b);
    cand[OP_XNOR] = zext(~(a ^ b));
    cand[OP_NOT]  = zext(~a);
    cand[OP_NEG]  = zext(-a);
    cand[OP_SHR]  = zext(a >> b[2:0]);
    cand[OP_SHL]  = lane_res_t'(a) << b[2:0];
    y = onehot_mux(cand, ctrl.sel_oh);
  end

  // The controlling unit must hand over a one-hot select that matches the
  // operation code.
  always_comb begin
    assert (ctrl.sel_oh == (op_onehot_t'(1) << ctrl.op))
      else $error("one-hot select %h does not match operation %0d", ctrl.sel_oh, ctrl.op);
  end

endmodule
