// tb_rom_core: self-checking test of the ROM core (latches, matrix,
// precharge timing) at 6 states x 9 outputs. Random latch inputs, including
// several active rows at once, are applied every cycle. Checks: q is the D
// of the previous edge (0 under reset); the outputs are 0 in the precharge
// half and the OR of the active rows' words (plus cascade_in) in the
// evaluate half; one edge under reset leaves every state inactive.
module tb_rom_core;
  localparam int unsigned S = 6;
  localparam int unsigned O = 9;
  localparam logic [S-1:0][O-1:0] CT = '{
    9'b0_0000_0011, 9'b1_0000_0000, 9'b0_1100_0100, 9'b0_0011_1000,
    9'b1_0101_0101, 9'b0_0000_0000
  };
  logic clk = 1'b0, reset;
  logic [S-1:0] d, q, exp_q;
  logic [O-1:0] cas, out, exp_out;
  int checks = 0, failures = 0, multi = 0;

  always #5 clk = ~clk;

  rom_core #(.N_STATES(S), .N_OUT(O), .CONTENT(CT)) dut (
    .clk(clk), .reset(reset), .d(d), .cascade_in(cas), .q(q), .out(out));

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; d = '0; cas = '0;
    @(posedge clk); #1;
    check(16'(q), 16'(0), "q under reset");
    reset = 1'b0;
    #1 check(16'(q), 16'(0), "q after reset edge");
    exp_q = '0;
    for (int i = 0; i < 800; i++) begin
      @(posedge clk); #1;
      check(16'(out), 16'(0), "outputs during precharge");
      @(negedge clk); #1;
      exp_out = '0;
      for (int s = 0; s < S; s++) if (exp_q[s]) exp_out |= CT[s];
      exp_out |= cas;
      check(16'(q), 16'(exp_q), "active states");
      check(16'(out), 16'(exp_out), "output word");
      if ($countones(exp_q) > 1) multi++;
      d = S'($urandom);
      cas = (i % 9 == 0) ? O'($urandom) : '0;
      exp_q = d;
    end
    checks++;
    if (multi == 0) begin failures++; $display("FAIL no multi-state cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
