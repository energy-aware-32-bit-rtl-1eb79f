// tb_clock_gate_and - self-checking testbench of the AND clock gate.
// Toggles the clock with the enable high and low (changing the enable only
// while the clock is low), checks the gated clock at every phase, and counts
// the rising edges of the gated clock against the enabled cycles.
module tb_clock_gate_and;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int gedges = 0, exp_edges = 0;

  clock_gate_and dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) gedges++;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 64; c++) begin
      en = 1'($urandom_range(0, 1));   // clk is low here
      #5;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high while clk low"); end
      clk = 1;
      if (en) exp_edges++;
      #5;
      checks++;
      if (gclk !== en) begin failures++; $display("FAIL cycle %0d en=%0b gclk=%0b", c, en, gclk); end
      clk = 0;
    end
    #1;
    checks++;
    if (gedges != exp_edges) begin
      failures++;
      $display("FAIL gated edges %0d expected %0d", gedges, exp_edges);
    end
    $display("gated edges %0d of 64 cycles", gedges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
