// tb_state_control_logic: self-checking test of the next-state logic in its
// default configuration, the two-loop example machine. Random active-state
// vectors, tests and start are applied; the expected latch inputs are
// written out by hand from the machine's graph (fork from S, if on a, loops
// on b and c, JOIN into F) and the JOIN is modelled separately.
module tb_state_control_logic;
  import mtrc_pkg::*;
  logic clk = 1'b0, reset, start;
  logic [2:0] test;
  logic [7:0] q, d, exp_d;
  logic j0, j1;            // reference JOIN memory
  logic a, b, c, ji0, ji1, jx0, jx1;
  int checks = 0, failures = 0, joins = 0;

  always #5 clk = ~clk;

  state_control_logic dut (.clk(clk), .reset(reset), .start(start), .test(test),
                           .q(q), .d(d));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; q = '0; start = 1'b0; test = '0;
    @(posedge clk); #1;
    reset = 1'b0; j0 = 1'b0; j1 = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      q = 8'($urandom) & 8'($urandom);
      test = 3'($urandom);
      start = ($urandom % 5) == 0;
      reset = ($urandom % 50) == 0;
      if (reset) q = '0;   // latch outputs are low under reset
      a = test[0]; b = test[1]; c = test[2];
      ji0 = q[2] & ~b;
      ji1 = (q[5] & ~c) | q[6];
      jx0 = (ji0 | j0) & ~q[7] & ~reset;
      jx1 = (ji1 | j1) & ~q[7] & ~reset;
      exp_d[0] = start;
      exp_d[1] = q[0] | (q[2] & b);
      exp_d[2] = q[1];
      exp_d[3] = (q[0] & ~a) | (q[5] & c);
      exp_d[4] = q[3];
      exp_d[5] = q[4];
      exp_d[6] = q[0] & a;
      exp_d[7] = jx0 & jx1;
      #1;
      checks++;
      if (d !== exp_d) begin
        failures++;
        $display("FAIL q=%b test=%b start=%0b d=%b exp=%b", q, test, start, d, exp_d);
      end
      if (exp_d[7]) joins++;
      @(posedge clk);
      j0 = jx0; j1 = jx1;
      #1;
    end
    checks++;
    if (joins == 0) begin failures++; $display("FAIL join never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
