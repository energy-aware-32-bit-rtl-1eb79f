// clock_gate_and - AND-based clock gate.
//
// The gated clock is the free-running clock ANDed with an enable: while en
// is low the gated clock stays low and every flip-flop behind it keeps its
// value, which saves the clock and switching power of the idle logic.
//
// Interface: clk, en in; gclk out. Combinational.
//
// The gate is a bare two-input AND, as the design specifies, with no latch
// on the enable. en must therefore change only while clk is low; a change
// while clk is high would cut or add a clock pulse. Callers are responsible
// for that timing (the testbenches drive en on the falling edge).
module clock_gate_and (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  assign gclk = clk & en;

endmodule
