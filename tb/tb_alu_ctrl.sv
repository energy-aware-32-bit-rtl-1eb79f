// tb_alu_ctrl - self-checking testbench of the controlling unit.
// Applies all 16 instruction codes and checks the operation field and that
// the one-hot select has exactly the bit of that code set.
module tb_alu_ctrl;
  import alu_pkg::*;

  logic [3:0] sel;
  alu_ctrl_t  ctrl;
  int checks = 0, failures = 0;

  alu_ctrl dut (.sel(sel), .ctrl(ctrl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      sel = 4'(s);
      #1;
      checks++;
      if (int'(ctrl.op) != s) begin
        failures++;
        $display("FAIL sel=%0d op=%0d", s, ctrl.op);
      end
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (ctrl.sel_oh[k] != (k == s)) begin
          failures++;
          $display("FAIL sel=%0d sel_oh=%h", s, ctrl.sel_oh);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
