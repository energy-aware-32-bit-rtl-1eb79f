// alu_ctrl - controlling unit of the energy-aware 32-bit ALU.
//
// Decodes the 4-bit instruction select into the control word shared by the
// four 8-bit lanes: the operation, and the same operation as a 16-bit
// one-hot vector that drives the AND-OR result multiplexer inside each lane,
// so that a lane needs no decoder of its own.
//
// Interface: sel in, ctrl out. Purely combinational, no clock.
//
// The design is specified only as having a controlling unit that steers all
// four lanes; the decoder form and the one-hot select are this design's own.
module alu_ctrl
  import alu_pkg::*;
(
  input  logic [SEL_W-1:0] sel,
  output alu_ctrl_t        ctrl
);

  always_comb begin
    ctrl.op     = alu_op_e'(sel);
    ctrl.sel_oh = op_onehot_t'(1) << sel;
  end

endmodule
