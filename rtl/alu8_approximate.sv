// alu8_approximate - approximate 8-bit sub-ALU (lane 4 of the 32-bit ALU).
//
// All six arithmetic instructions work on operands whose four least
// significant bits are truncated (taken as zero). The hardware therefore
// only handles the upper nibbles and shifts the result into place:
//   add, subtract  (a_hi +/- b_hi) << 4
//   multiply       (a_hi * b_hi) << 8, square (a_hi * a_hi) << 8
//   divide         a_hi / b_hi (the low bits cancel), 8'hFF when b_hi is 0
//   modulus        (a_hi % b_hi) << 4, a with low bits cleared when b_hi is 0
// Two's complement is approximate too: the +1 increment is dropped, so it
// returns the one's complement, one below the exact value. The other
// logical instructions and the shifts are exact.
//
// Truncating four low bits of every arithmetic instruction and approximating
// two's complement follow the design's specification (80-90 % accuracy for
// arithmetic, 95-100 % for logic); dropping the increment is this design's
// own reading of how two's complement is approximated.
//
// Interface: a, b, ctrl in; y out (16 bits). Purely combinational. An
// assertion checks that ctrl's one-hot select matches its operation code.
// Result formats are otherwise those of alu8_accurate.
module alu8_approximate
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

  logic [HI_W-1:0] a_hi, b_hi;
  assign a_hi = a[LANE_W-1:TRUNC_BITS];
  assign b_hi = b[LANE_W-1:TRUNC_BITS];

  lane_res_t [NUM_OPS-1:0] cand;

  always_comb begin
    cand          = '0;
    cand[OP_ADD]  = (lane_res_t'(a_hi) + lane_res_t'(b_hi)) << TRUNC_BITS;
    cand[OP_SUB]  = (lane_res_t'(a_hi) - lane_res_t'(b_hi)) << TRUNC_BITS;
    cand[OP_MUL]  = (lane_res_t'(a_hi) * lane_res_t'(b_hi)) << (2 * TRUNC_BITS);
    cand[OP_DIV]  = (b_hi == '0) ? zext('1) : zext({{TRUNC_BITS{1'b0}}, a_hi / b_hi});
    cand[OP_SQR]  = (lane_res_t'(a_hi) * lane_res_t'(a_hi)) << (2 * TRUNC_BITS);
    cand[OP_MOD]  = (b_hi == '0) ? zext({a_hi, {TRUNC_BITS{1'b0}}})
                                 : zext({a_hi % b_hi, {TRUNC_BITS{1'b0}}});
    cand[OP_AND]  = zext(a & b);
    cand[OP_OR]   = zext(a | b);
    cand[OP_NOR]  = zext(~(a | b));
    cand[OP_NAND] = zext(~(a & b));
    cand[OP_XOR]  = zext(a ^ b);
    cand[OP_XNOR] = zext(~(a ^ b));
    cand[OP_NOT]  = zext(~a);
    cand[OP_NEG]  = zext(~a);
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
