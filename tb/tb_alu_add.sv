// tb_alu_add - self-checking testbench of the output stage.
// Applies random lane results, clocks the stage, and checks that the 64-bit
// output holds {acc1, acc2, semi, apx} of the last edge and keeps it while
// no clock edge arrives.
module tb_alu_add;
  import alu_pkg::*;

  logic      gclk = 0;
  lane_res_t y_acc1, y_acc2, y_semi, y_apx;
  logic [63:0] outalu, exp;
  int checks = 0, failures = 0;

  alu_add dut (.gclk(gclk), .y_acc1(y_acc1), .y_acc2(y_acc2), .y_semi(y_semi),
               .y_apx(y_apx), .outalu(outalu));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 200; c++) begin
      y_acc1 = 16'($urandom); y_acc2 = 16'($urandom);
      y_semi = 16'($urandom); y_apx  = 16'($urandom);
      #5 gclk = 1;
      exp = (64'(y_acc1) << 48) | (64'(y_acc2) << 32) | (64'(y_semi) << 16) | 64'(y_apx);
      #1;
      checks++;
      if (outalu !== exp) begin failures++; $display("FAIL %h expected %h", outalu, exp); end
      #4 gclk = 0;
      // new inputs without an edge must not reach the output
      y_acc1 = ~y_acc1; y_apx = ~y_apx;
      #1;
      checks++;
      if (outalu !== exp) begin failures++; $display("FAIL output changed without clock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
