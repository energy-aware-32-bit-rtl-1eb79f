// alu8_accurate - exact 8-bit sub-ALU (lanes 1 and 2 of the 32-bit ALU).
//
// Executes all sixteen instructions exactly on one byte of each operand and
// returns a 16-bit result. Every functional unit computes in parallel and a
// one-hot AND-OR multiplexer, driven by the controlling unit, picks the
// result of the selected instruction.
//
// Interface: a, b (unsigned bytes), ctrl (decoded instruction) in; y out.
// An assertion checks that the one-hot select in ctrl matches its
// operation code. Purely combinational; the 32-bit ALU registers y in its output stage.
//
// Result formats, all this design's own choices:
//   add       9-bit sum, zero-extended
//   subtract  a - b as a 16-bit two's-complement number
//   multiply  16-bit product; square a*a likewise
//   divide    8-bit quotient, 8'hFF when b is zero
//   modulus   8-bit remainder, a when b is zero
//   logical   8-bit result, zero-extended; two's complement is -a modulo 256
//   shifts    a shifted by b[2:0]; left shift keeps the bits shifted out of
//             the byte in y[15:8], right shift is logical
module alu8_accurate
  import alu_pkg::*;
(
  input  lane_t     a,
  input  lane_t     b,
  input  alu_ctrl_t ctrl,
  output lane_res_t y
);

  lane_res_t [NUM_OPS-1:0] cand;

  always_comb begin
    cand          = '0;
    cand[OP_ADD]  = lane_res_t'(a) + lane_res_t'(b);
    cand[OP_SUB]  = lane_res_t'(a) - lane_res_t'(b);
    cand[OP_MUL]  = lane_res_t'(a) * lane_res_t'(b);
    cand[OP_DIV]  = (b == '0) ? zext('1) : zext(a / b);
    cand[OP_SQR]  = lane_res_t'(a) * lane_res_t'(a);
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
