// tb_alu8_accurate - self-checking testbench of the 8-bit accurate lane.
// Drives every instruction with all 65,536 operand pairs (exhaustive) and
// compares the 16-bit result with the integer reference model. The control
// word is built here from the instruction code, not by the controlling unit.
module tb_alu8_accurate;
  import alu_pkg::*;
  import tb_alu_ref_pkg::*;

  lane_t     a, b;
  alu_ctrl_t ctrl;
  lane_res_t y;
  int checks = 0, failures = 0;

  alu8_accurate dut (.a(a), .b(b), .ctrl(ctrl), .y(y));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int op = 0; op < 16; op++) begin
      ctrl.op     = alu_op_e'(op);
      ctrl.sel_oh = '0;
      ctrl.sel_oh[op] = 1'b1;
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          a = lane_t'(i);
          b = lane_t'(j);
          #1;
          exp = ref_lane(LANE_EXACT, op, i, j);
          checks++;
          if (int'(y) != exp) begin
            failures++;
            if (failures <= 10)
              $display("FAIL op=%0d a=%0d b=%0d y=%0d expected %0d", op, i, j, y, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
