// tb_alu_proposed - end-to-end self-checking testbench of the 32-bit ALU.
//
// Runs the top level at its default sizes. Each clock cycle it applies new
// operands, an instruction and an enable on the falling edge, and after the
// rising edge checks the 64-bit OUTALU against the integer reference model
// of each lane (accurate, accurate, semi-accurate, approximate). With the
// enable low it checks that OUTALU keeps its old value and that the gated
// clock Q stays low. The first cycles are directed (every instruction,
// divide and modulus by zero); the rest are random.
//
// It counts how often each mechanism occurred and fails if one never did:
// every one of the 16 instructions, clock-gated hold cycles, semi-accurate
// and approximate lanes returning a result that differs from the exact one,
// and division by zero.
module tb_alu_proposed;
  import alu_pkg::*;
  import tb_alu_ref_pkg::*;

  localparam int N_RANDOM = 20000;

  logic        clk = 0;
  logic        En  = 0;
  logic [31:0] A = '0, B = '0;
  logic [3:0]  Sel = '0;
  logic [63:0] OUTALU;
  logic        Q;

  int checks = 0, failures = 0;
  int op_count[16];
  int hold_count = 0, semi_err_count = 0, apx_err_count = 0, div0_count = 0;
  int q_edges = 0, en_cycles = 0;

  alu_proposed dut (
    .clk(clk), .En(En), .A(A), .B(B), .Sel(Sel), .OUTALU(OUTALU), .Q(Q)
  );

  always #5 clk = ~clk;
  always @(posedge Q) q_edges++;

  initial begin : watchdog
    repeat (N_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] expected(logic [31:0] a, logic [31:0] b, int op);
    logic [63:0] e;
    e[63:48] = 16'(ref_lane(LANE_EXACT, op, int'(a[31:24]), int'(b[31:24])));
    e[47:32] = 16'(ref_lane(LANE_EXACT, op, int'(a[23:16]), int'(b[23:16])));
    e[31:16] = 16'(ref_lane(LANE_SEMI,  op, int'(a[15:8]),  int'(b[15:8])));
    e[15:0]  = 16'(ref_lane(LANE_APX,   op, int'(a[7:0]),   int'(b[7:0])));
    return e;
  endfunction

  logic [63:0] prev_out;

  // Apply one operation on the falling edge; check it after the rising edge.
  task automatic step(logic [31:0] a, logic [31:0] b, int op, logic en);
    logic [63:0] e;
    @(negedge clk);
    A = a; B = b; Sel = 4'(op); En = en;
    prev_out = OUTALU;
    #1;
    checks++;
    if (Q !== 1'b0) begin failures++; $display("FAIL Q high while clk low"); end
    @(posedge clk);
    #1;
    checks++;
    if (Q !== en) begin failures++; $display("FAIL Q=%0b with En=%0b", Q, en); end
    checks++;
    if (en) begin
      en_cycles++;
      e = expected(a, b, op);
      op_count[op]++;
      if (e[31:16] != 16'(ref_lane(LANE_EXACT, op, int'(a[15:8]), int'(b[15:8])))) semi_err_count++;
      if (e[15:0]  != 16'(ref_lane(LANE_EXACT, op, int'(a[7:0]),  int'(b[7:0]))))  apx_err_count++;
      if ((op == 3 || op == 5) && (b[31:24] == 0 || b[23:16] == 0 || b[15:8] == 0)) div0_count++;
      if (OUTALU !== e) begin
        failures++;
        if (failures <= 10)
          $display("FAIL op=%0d A=%h B=%h OUTALU=%h expected %h", op, a, b, OUTALU, e);
      end
    end else begin
      hold_count++;
      if (OUTALU !== prev_out) begin
        failures++;
        $display("FAIL OUTALU changed with En low: %h -> %h", prev_out, OUTALU);
      end
    end
  endtask

  initial begin
    // First load, so OUTALU is defined before any hold check.
    step(32'h0102_0304, 32'h0506_0708, 0, 1'b1);
    // Directed: every instruction on fixed operands, then with zero divisors.
    for (int op = 0; op < 16; op++) step(32'hC8_7F_B3_9D, 32'h0D_FF_27_E3, op, 1'b1);
    step(32'h55_AA_F0_0F, 32'h00_00_00_0F, 3, 1'b1);
    step(32'h55_AA_F0_0F, 32'h00_00_00_0F, 5, 1'b1);
    // Gated: inputs change, output must hold.
    step(32'hFFFF_FFFF, 32'h1234_5678, 2, 1'b0);
    step(32'h0000_0000, 32'h8765_4321, 9, 1'b0);
    // Random.
    for (int i = 0; i < N_RANDOM; i++) begin
      logic [31:0] b;
      b = $urandom;
      if ($urandom_range(0, 15) == 0) b[7:0]   = '0;
      if ($urandom_range(0, 15) == 0) b[31:24] = '0;
      step($urandom, b, int'($urandom_range(0, 15)), ($urandom_range(0, 4) != 0));
    end
    @(negedge clk);
    En = 0;

    // Mechanism coverage.
    for (int op = 0; op < 16; op++) begin
      $display("instruction %0d executed %0d times", op, op_count[op]);
      checks++;
      if (op_count[op] == 0) begin failures++; $display("FAIL instruction %0d never ran", op); end
    end
    $display("clock-gated hold cycles:          %0d", hold_count);
    $display("semi-accurate lane inexact:       %0d", semi_err_count);
    $display("approximate lane inexact:         %0d", apx_err_count);
    $display("division or modulus by zero:      %0d", div0_count);
    checks += 5;
    if (hold_count == 0)     begin failures++; $display("FAIL no hold cycle"); end
    if (semi_err_count == 0) begin failures++; $display("FAIL semi lane never inexact"); end
    if (apx_err_count == 0)  begin failures++; $display("FAIL approximate lane never inexact"); end
    if (div0_count == 0)     begin failures++; $display("FAIL no division by zero"); end
    // One gated clock pulse per enabled cycle: result latency is one cycle.
    if (q_edges != en_cycles) begin
      failures++;
      $display("FAIL %0d gated clock edges for %0d enabled cycles", q_edges, en_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
