// tb_state_latch: self-checking test of one state latch.
// Drives random D, reset and checks: q equals the D sampled at the last
// rising edge (0 while reset), rom_row is 0 in the precharge half of the
// cycle and equals q in the evaluate half, and one edge under reset with
// D = 0 clears the stored bit.
module tb_state_latch;
  logic clk = 1'b0, reset, d, q, rom_row;
  logic precharge;
  int checks = 0, failures = 0;
  logic exp_stored;

  assign precharge = clk;
  always #5 clk = ~clk;

  state_latch dut (.clk(clk), .reset(reset), .precharge(precharge), .d(d),
                   .q(q), .rom_row(rom_row));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; d = 1'b0;
    @(posedge clk); #1;
    check(q, 1'b0, "q under reset");
    reset = 1'b0;
    #1 check(q, 1'b0, "cleared after reset edge");
    exp_stored = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      reset = ($urandom % 10) == 0;
      #1;
      check(q, exp_stored & ~reset, "q before edge");
      check(rom_row, exp_stored & ~reset, "rom_row in evaluate half");
      @(posedge clk);
      exp_stored = d;
      #1;
      check(q, exp_stored & ~reset, "q after edge");
      check(rom_row, 1'b0, "rom_row in precharge half");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
