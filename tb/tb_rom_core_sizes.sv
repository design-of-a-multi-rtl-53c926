// tb_rom_core_sizes: runs the latch/ROM stimulus used to characterise the
// ROM core on cores of the sizes it was characterised at (outputs x states:
// 50x28, 100x28, 50x52, 100x52 and 200x100), the 52-state, 100-output core
// with its default parameters.
//
// Stimulus, per core, on the latch of row 0: a reset pulse over cycle 1
// with D high; D stays high until the middle of cycle 3, is low in cycle 4's
// preparation and rises again just before cycle 5. Expected, cycle by cycle:
// the latch output is high in cycles 2, 3 and 5 and low in 1 and 4; the
// ROM outputs of row 0 rise only in the second half of cycles 2, 3 and 5 and
// are low in every first (precharge) half. All other rows stay inactive.
// Each ROM output is checked against row 0's word of the core's content.
module tb_rom_core_sizes;
  logic clk = 1'b0, reset;
  logic d0;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;   // 40 ns cycle (25 MHz)

  task automatic chk(input bit ok, input string what, input int cyc, input int sz);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL size %0d: %s in cycle %0d at %0t", sz, what, cyc, $time);
    end
  endtask

  // One core per size, all fed by the same row-0 stimulus.
  `define CORE(NAME, S, O) \
    logic [S-1:0] q_``NAME; logic [O-1:0] o_``NAME; \
    rom_core #(.N_STATES(S), .N_OUT(O)) u_``NAME ( \
      .clk(clk), .reset(reset), .d({{(S-1){1'b0}}, d0}), .cascade_in('0), \
      .q(q_``NAME), .out(o_``NAME));
  `CORE(s28_o50, 28, 50)
  `CORE(s28_o100, 28, 100)
  `CORE(s52_o50, 52, 50)
  rom_core u_default (.clk(clk), .reset(reset), .d({51'b0, d0}), .cascade_in('0),
                      .q(q_default), .out(o_default));
  logic [51:0] q_default; logic [99:0] o_default;
  `CORE(s100_o200, 100, 200)
  `undef CORE

  // Row-0 word of the default content: every second column filled.
  function automatic bit word_ok(input logic [199:0] o, input int n, input bit act);
    for (int c = 0; c < n; c++)
      if (o[c] !== (act && (c % 2 == 0))) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected latch output per cycle 1..5
  bit exp_q [1:5] = '{0, 1, 1, 0, 1};

  initial begin
    reset = 1'b1; d0 = 1'b1;
    for (int cyc = 1; cyc <= 5; cyc++) begin
      @(posedge clk);           // start of cycle cyc
      #2;
      if (cyc == 1) reset = 1'b1;
      chk(q_s28_o50[0] == (exp_q[cyc] && cyc != 1), "latch output", cyc, 28);
      chk(q_default[0] == exp_q[cyc], "latch output (52x100)", cyc, 52);
      chk(q_s100_o200[0] == exp_q[cyc], "latch output (100x200)", cyc, 100);
      chk((q_default >> 1) == '0 && (q_s100_o200 >> 1) == '0, "other rows idle", cyc, 52);
      // precharge half: all outputs low
      chk(o_s28_o50 == '0 && o_s28_o100 == '0 && o_s52_o50 == '0 &&
          o_default == '0 && o_s100_o200 == '0, "outputs low in precharge", cyc, 0);
      #14;
      if (cyc == 3) d0 = 1'b0;      // D falls halfway between cycles 3 and 4
      @(negedge clk);               // second half of the cycle
      #4;
      chk(word_ok(200'(o_s28_o50), 50, exp_q[cyc]), "ROM word", cyc, 28);
      chk(word_ok(200'(o_s28_o100), 100, exp_q[cyc]), "ROM word", cyc, 28);
      chk(word_ok(200'(o_s52_o50), 50, exp_q[cyc]), "ROM word", cyc, 52);
      chk(word_ok(200'(o_default), 100, exp_q[cyc]), "ROM word", cyc, 52);
      chk(word_ok(o_s100_o200, 200, exp_q[cyc]), "ROM word", cyc, 100);
      if (cyc == 1) #6 reset = 1'b0;  // reset pulse ends late in cycle 1
      if (cyc == 4) begin
        #6 d0 = 1'b1;               // D rises 10 ns before cycle 5
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
