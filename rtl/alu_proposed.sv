// alu_proposed - energy-aware 32-bit ALU for error-tolerant data.
//
// The 32-bit operands A and B are cut into four bytes, and each byte pair
// goes to its own 8-bit sub-ALU. The two most significant bytes use exact
// sub-ALUs; the third byte uses a semi-accurate one (multiply and square
// on truncated operands) and the least significant byte an approximate one
// (all arithmetic on truncated operands, approximate two's complement).
// Errors are thus confined to the low-order bytes, where error-tolerant
// data such as pixels or audio samples can absorb them, while the
// truncated lanes need smaller adders, multipliers and dividers.
//
// A controlling unit decodes the 4-bit instruction select (16 instructions)
// for all lanes. Each lane returns 16 bits; the output stage ALUADD joins
// them into the 64-bit OUTALU and registers it on a clock gated by an AND
// of clk and En, so with En low the output register does not toggle.
//
//   OUTALU[63:48]  accurate ALU 1       on A[31:24], B[31:24]
//   OUTALU[47:32]  accurate ALU 2       on A[23:16], B[23:16]
//   OUTALU[31:16]  semi-accurate ALU 3  on A[15:8],  B[15:8]
//   OUTALU[15:0]   approximate ALU 4    on A[7:0],   B[7:0]
//
// Interface: clk, En, A, B, Sel in; OUTALU and Q (the gated clock) out,
// the port names of the specified top level.
// Timing: OUTALU shows the result of the A, B, Sel present at a rising edge
// of clk while En is high, one cycle after they are applied. En must change
// only while clk is low (bare AND gate, no latch). No reset.
//
// The four-lane split, the lane accuracies, the 16 instructions, the AND
// clock gate and the port list follow the specification. The lane order,
// the independence of the lanes (no carries between bytes), the opcode
// numbering and the registered output are this design's own choices.
module alu_proposed
  import alu_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned OUT_W  = 64
) (
  input  logic              clk,
  input  logic              En,
  input  logic [DATA_W-1:0] A,
  input  logic [DATA_W-1:0] B,
  input  logic [SEL_W-1:0]  Sel,
  output logic [OUT_W-1:0]  OUTALU,
  output logic              Q
);

  // The lane structure is fixed: four 8-bit lanes, 16-bit results each.
  if (DATA_W != NUM_LANES * LANE_W || OUT_W != NUM_LANES * LANE_RES_W) begin : g_bad_width
    $error("alu_proposed: DATA_W must be %0d and OUT_W %0d",
           NUM_LANES * LANE_W, NUM_LANES * LANE_RES_W);
  end

  logic      gclk;
  alu_ctrl_t ctrl;
  lane_res_t y_acc1, y_acc2, y_semi, y_apx;

  // AND_GATE_BASED: gated clock for the output register
  clock_gate_and u_cg (
    .clk  (clk),
    .en   (En),
    .gclk (gclk)
  );
  assign Q = gclk;

  // Controlling unit
  alu_ctrl u_ctrl (
    .sel  (Sel),
    .ctrl (ctrl)
  );

  // ALUACCURATE1: most significant byte
  alu8_accurate u_acc1 (
    .a    (A[31:24]),
    .b    (B[31:24]),
    .ctrl (ctrl),
    .y    (y_acc1)
  );

  // ALUACCURATE2
  alu8_accurate u_acc2 (
    .a    (A[23:16]),
    .b    (B[23:16]),
    .ctrl (ctrl),
    .y    (y_acc2)
  );

  // ALUSEMIACCURATE
  alu8_semi_accurate u_semi (
    .a    (A[15:8]),
    .b    (B[15:8]),
    .ctrl (ctrl),
    .y    (y_semi)
  );

  // ALUAPPROXIMATE: least significant byte
  alu8_approximate u_apx (
    .a    (A[7:0]),
    .b    (B[7:0]),
    .ctrl (ctrl),
    .y    (y_apx)
  );

  // ALUADD: join the lanes and register the result
  alu_add u_add (
    .gclk   (gclk),
    .y_acc1 (y_acc1),
    .y_acc2 (y_acc2),
    .y_semi (y_semi),
    .y_apx  (y_apx),
    .outalu (OUTALU)
  );

endmodule
