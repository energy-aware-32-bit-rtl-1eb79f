// alu_add - output stage of the energy-aware 32-bit ALU.
//
// Joins the four 16-bit lane results into the 64-bit ALU result, most
// significant lane first: {accurate 1, accurate 2, semi-accurate,
// approximate}, and holds it in a 64-bit register clocked by the gated
// clock. When the clock gate is closed the register keeps its value and
// does not toggle.
//
// Interface: gclk, the four lane results in; outalu out.
// Timing: outalu takes the lane results at each rising edge of gclk. There
// is no reset: the register holds an unknown value until the first edge.
//
// The stage's existence, its four inputs and its 64-bit output are part of
// the design's structure; the lane order and the register are this design's
// own reading of it.
module alu_add
  import alu_pkg::*;
(
  input  logic                          gclk,
  input  lane_res_t                     y_acc1,
  input  lane_res_t                     y_acc2,
  input  lane_res_t                     y_semi,
  input  lane_res_t                     y_apx,
  output logic [NUM_LANES*LANE_RES_W-1:0] outalu
);

  always_ff @(posedge gclk) begin
    outalu <= {y_acc1, y_acc2, y_semi, y_apx};
  end

endmodule
