// tb_join_wait: self-checking test of the JOIN wait logic with three inputs.
// Tokens arrive in random cycles (together or apart); the block must pass a
// token in the cycle the last missing token arrives, not before, and forget
// everything once the following state is active or reset is applied. A
// reference model tracks which inputs have arrived.
module tb_join_wait;
  localparam int unsigned N = 3;
  logic clk = 1'b0, reset, st, out;
  logic [N-1:0] in, seen;
  int checks = 0, failures = 0, fired = 0, waited = 0;

  always #5 clk = ~clk;

  join_wait #(.N_IN(N)) dut (.clk(clk), .reset(reset), .st(st), .in(in), .out(out));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic exp_out;
  initial begin
    reset = 1'b1; st = 1'b0; in = '0; seen = '0;
    @(posedge clk); @(posedge clk);
    #1 reset = 1'b0;
    for (int i = 0; i < 1500; i++) begin
      // the following state is active the cycle after the join fired
      st = (exp_out === 1'b1 && i > 0);
      in = '0;
      if (!st) for (int k = 0; k < N; k++) if (!seen[k] && ($urandom % 4 == 0)) in[k] = 1'b1;
      reset = ($urandom % 97) == 0;
      #1;
      exp_out = !st && !reset && (&(seen | in));
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL cycle %0d: in=%b seen=%b st=%0b out=%0b exp=%0b", i, in, seen, st, out, exp_out);
      end
      if (exp_out) begin
        fired++;
        if (seen != '0) waited++;
      end
      @(posedge clk);
      if (st || reset) seen = '0;
      else seen = seen | in;
      #1;
    end
    checks++;
    if (fired == 0 || waited == 0) begin
      failures++;
      $display("FAIL join never fired (%0d) or never waited (%0d)", fired, waited);
    end
    $display("joins fired %0d, after waiting %0d", fired, waited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
