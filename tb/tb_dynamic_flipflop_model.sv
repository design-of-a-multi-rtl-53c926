// tb_dynamic_flipflop_model: self-checking test of the dynamic latch model.
// Two non-overlapping phase clocks (period 40, clk1 then clk2) and a
// precharge signal high during the first half of each cycle are generated.
// Checks: Q takes the D present during clk1 once clk2 has passed it on and
// holds it while D changes later in the cycle; reset forces Q and the row
// line low; the row line is low during precharge and equals Q otherwise.
// A final section overlaps the clocks and checks that D then runs straight
// through to Q, the hazard the two-phase scheme exists to avoid.
`timescale 1ns / 1ps
module tb_dynamic_flipflop_model;
  logic clk1 = 1'b0, clk2 = 1'b0, reset = 1'b0, precharge = 1'b0, d = 1'b0;
  logic q, rom;
  logic exp;
  int checks = 0, failures = 0;

  dynamic_flipflop_model dut (.clk1(clk1), .clk2(clk2), .reset(reset),
                              .precharge(precharge), .d(d), .q(q), .rom(rom));

  task automatic check(input logic got, input logic e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, e, $time);
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One 40 ns cycle: clk1 0-8, clk2 12-18, precharge 0-20.
  task automatic run_cycle(input logic din, input logic rst, input logic late_d);
    d = din; reset = rst;
    precharge = 1'b1; clk1 = 1'b1;
    #8 clk1 = 1'b0;
    #1 d = late_d;          // D changes after clk1 closed: must be ignored
    #3 clk2 = 1'b1;
    #6 clk2 = 1'b0;
    #2 precharge = 1'b0;
    #5;
    exp = din & ~rst;
    check(q, exp, "q in evaluate half");
    check(rom, exp, "rom row in evaluate half");
    #15;
  endtask

  initial begin
    // clear: reset cycle with D = 0
    run_cycle(1'b0, 1'b1, 1'b0);
    for (int i = 0; i < 300; i++) begin
      logic din, rst;
      din = 1'($urandom);
      rst = ($urandom % 12) == 0;
      run_cycle(din, rst, ~din);
      // next cycle's precharge: row line low, q still held
      precharge = 1'b1;
      #2;
      check(rom, 1'b0, "rom row during precharge");
      check(q, din & ~rst, "q held into next cycle");
      precharge = 1'b0;
      #1;
    end
    // overlapping clocks: D passes straight through to Q
    reset = 1'b0;
    d = 1'b0; clk1 = 1'b1; clk2 = 1'b1; #5;
    check(q, 1'b0, "overlap, d=0");
    d = 1'b1; #5;
    check(q, 1'b1, "overlap: d runs through");
    clk1 = 1'b0; clk2 = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
