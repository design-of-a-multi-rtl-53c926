// tb_mt_rom_controller: end-to-end test of the controller in its default
// configuration (the two-loop example machine), with no parameter changed.
//
// A reference model keeps the set of active states and the JOIN memory and
// advances them from the machine's graph, written out independently of the
// RTL. Each run resets the controller, starts it, drives random test signals
// and checks, every cycle, the output word (0 in the precharge half, the OR
// of the active states' words in the evaluate half) and ready, until the
// final state has been reached. A first directed run checks the latency of
// the shortest path: start, S, {u0, t0}, u1, F, i.e. ready four edges after
// start is sampled. The test counts the mechanisms of the design and fails
// if one never happened: fork into concurrent threads, both arms of the if,
// both loops taken, several states active at once, the JOIN waiting for a
// late thread, the JOIN firing on simultaneous arrival, reset in the middle
// of a run, and the cascade input.
module tb_mt_rom_controller;
  import mtrc_pkg::*;
  logic clk = 1'b0, reset, start, ready;
  logic [2:0] test;
  logic [3:0] cas, out;
  int checks = 0, failures = 0;

  // reference state
  logic [7:0] rq;
  logic rj0, rj1;

  // mechanism counters
  int n_fork = 0, n_then = 0, n_else = 0, n_uloop = 0, n_eloop = 0,
      n_multi = 0, n_wait = 0, n_simul = 0, n_ready = 0, n_reset = 0, n_cas = 0;

  always #5 clk = ~clk;

  mt_rom_controller dut (.clk(clk), .reset(reset), .start(start), .test(test),
                         .cascade_in(cas), .out(out), .ready(ready));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [3:0] word_of(input logic [7:0] st);
    logic [3:0] w = '0;
    if (st[0] | st[7])         w[3] = 1'b1;  // S, F
    if (st[1] | st[2])         w[0] = 1'b1;  // u-thread
    if (st[3] | st[4] | st[5]) w[1] = 1'b1;  // e-loop
    if (st[6])                 w[2] = 1'b1;  // t0
    return w;
  endfunction

  // Advance the reference model over one rising edge.
  task automatic ref_step(input logic st_in, input logic rst);
    logic a, b, c, i0, i1, x0, x1;
    logic [7:0] n;
    a = test[0]; b = test[1]; c = test[2];
    if (rst) begin
      rq = '0; rj0 = 1'b0; rj1 = 1'b0;
      // a start applied under reset still enters S
    end
    i0 = rq[2] & ~b;
    i1 = (rq[5] & ~c) | rq[6];
    x0 = (i0 | rj0) & ~rq[7] & ~rst;
    x1 = (i1 | rj1) & ~rq[7] & ~rst;
    n[0] = st_in;
    n[1] = rq[0] | (rq[2] & b);
    n[2] = rq[1];
    n[3] = (rq[0] & ~a) | (rq[5] & c);
    n[4] = rq[3];
    n[5] = rq[4];
    n[6] = rq[0] & a;
    n[7] = x0 & x1;
    // mechanism bookkeeping
    if (rq[0]) n_fork++;
    if (rq[0] & a) n_then++;
    if (rq[0] & ~a) n_else++;
    if (rq[2] & b) n_uloop++;
    if (rq[5] & c) n_eloop++;
    if (n[7] && i0 && i1) n_simul++;
    if (!n[7] && (x0 ^ x1)) n_wait++;
    rq = n; rj0 = x0; rj1 = x1;
  endtask

  // One clock cycle with the given inputs; checks both halves.
  task automatic cycle(input logic st_in, input logic rst, input logic [2:0] t);
    @(negedge clk);
    // evaluate half of the current cycle: outputs must be valid
    #1;
    check({4'b0, out}, {4'b0, word_of(rq) | cas}, "output word");
    check({7'b0, ready}, {7'b0, rq[7]}, "ready");
    if ($countones(rq) > 1) n_multi++;
    if (rq[7]) n_ready++;
    if (cas != 0 && rq != 0) n_cas++;
    start = st_in; reset = rst; test = t;
    @(posedge clk);
    #1;
    ref_step(st_in, rst);
    start = 1'b0;
    check({4'b0, out}, 8'h00, "precharge half");
  endtask

  task automatic do_reset();
    reset = 1'b1; start = 1'b0; test = '0; cas = '0;
    @(posedge clk);
    rq = '0; rj0 = 1'b0; rj1 = 1'b0;
    #1 reset = 1'b0;
  endtask

  initial begin
    int lat;
    int len;
    start = 1'b0; reset = 1'b1; test = '0; cas = '0;
    rq = '0; rj0 = 1'b0; rj1 = 1'b0;
    do_reset();

    // Directed run: a = 1, b = 0 -> shortest path, check the latency.
    cycle(1'b1, 1'b0, 3'b001);
    lat = 1;
    while (!rq[7] && lat < 20) begin
      cycle(1'b0, 1'b0, 3'b001);
      lat++;
    end
    checks++;
    if (lat != 4) begin
      failures++;
      $display("FAIL latency start->F: %0d edges, expected 4", lat);
    end
    cycle(1'b0, 1'b0, 3'b000);
    check(rq, 8'h00, "machine idle after F");

    // Random runs.
    for (int run = 0; run < 60; run++) begin
      do_reset();
      cycle(1'b1, 1'b0, 3'($urandom));
      len = 0;
      while (!rq[7] && len < 200) begin
        logic [2:0] t;
        t = 3'($urandom);
        // loops are taken with probability 1/2 (b, c random)
        cas = (run % 10 == 3) ? 4'($urandom) : '0;
        if (run % 15 == 7 && len == 3) begin
          cycle(1'b0, 1'b1, t);       // reset in the middle of a run
          n_reset++;
          check(rq, 8'h00, "reference after reset");
          cycle(1'b1, 1'b0, t);       // restart
        end else begin
          cycle(1'b0, 1'b0, t);
        end
        len++;
      end
      cas = '0;
      checks++;
      if (!rq[7]) begin failures++; $display("FAIL run %0d never finished", run); end
      cycle(1'b0, 1'b0, 3'b000);
      check(rq, 8'h00, "idle after the final state");
      cycle(1'b0, 1'b0, 3'b000);
    end

    $display("fork=%0d then=%0d else=%0d uloop=%0d eloop=%0d multi=%0d join_wait=%0d join_simul=%0d ready=%0d reset=%0d cascade=%0d",
             n_fork, n_then, n_else, n_uloop, n_eloop, n_multi, n_wait, n_simul, n_ready, n_reset, n_cas);
    if (n_fork == 0)  begin failures++; $display("FAIL no fork"); end
    if (n_then == 0)  begin failures++; $display("FAIL then arm never taken"); end
    if (n_else == 0)  begin failures++; $display("FAIL else arm never taken"); end
    if (n_uloop == 0) begin failures++; $display("FAIL u-loop never taken"); end
    if (n_eloop == 0) begin failures++; $display("FAIL e-loop never taken"); end
    if (n_multi == 0) begin failures++; $display("FAIL never several states active"); end
    if (n_wait == 0)  begin failures++; $display("FAIL join never waited"); end
    if (n_simul == 0) begin failures++; $display("FAIL join never on simultaneous arrival"); end
    if (n_ready == 0) begin failures++; $display("FAIL never ready"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset during a run"); end
    if (n_cas == 0)   begin failures++; $display("FAIL cascade input never used"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
