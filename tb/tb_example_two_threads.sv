// tb_example_two_threads: runs a moderately sized multi-thread machine on
// the controller: 28 states, 15 outputs, two tests. An input state and an
// entry state lead to a fork that starts two threads. The left thread runs two states, then branches
// on test 0 into a 2-state or a 3-state arm, merges and runs one more state;
// the right thread runs three states, branches on test 1 into two 3-state
// arms, merges and runs one more state. A JOIN waits for both threads, then
// an exit state and the output (final) state follow. The left thread always
// arrives first, so the JOIN always has to hold its token.
//
// A reference model follows the two threads as program counters (not as a
// token table) and predicts the active states every cycle; the test checks
// the controller's active states, its output word (ROM word of state k:
// output k mod 15, plus output 14 for every state from 15 up) and ready,
// and that ready comes 15 edges after start is sampled whatever the tests.
module tb_example_two_threads;
  import mtrc_pkg::*;
  localparam int unsigned NS = 28, NO = 15, NT = 2, NTR = 31;
  localparam int unsigned ENTRY = 0, FORK = 1, JOIN = 24, EXIT = 25, IN = 26, OUT = 27;

  localparam transition_t [NTR-1:0] TABLE = '{
    tr(SRC_START, IN, '0, '0, 0),
    tr(IN, ENTRY, '0, '0, 0),
    tr(ENTRY, FORK, '0, '0, 0),
    tr(FORK, 2, '0, '0, 0), tr(FORK, 12, '0, '0, 0),
    // left thread
    tr(2, 3, '0, '0, 0), tr(3, 4, '0, '0, 0),
    tr(4, 5, 16'h1, 16'h1, 0), tr(4, 7, 16'h1, 16'h0, 0),
    tr(5, 6, '0, '0, 0), tr(6, 10, '0, '0, 0),
    tr(7, 8, '0, '0, 0), tr(8, 9, '0, '0, 0), tr(9, 10, '0, '0, 0),
    tr(10, 11, '0, '0, 0), tr(11, JOIN, '0, '0, 0),
    // right thread
    tr(12, 13, '0, '0, 0), tr(13, 14, '0, '0, 0), tr(14, 15, '0, '0, 0),
    tr(15, 16, 16'h2, 16'h2, 0), tr(15, 19, 16'h2, 16'h0, 0),
    tr(16, 17, '0, '0, 0), tr(17, 18, '0, '0, 0), tr(18, 22, '0, '0, 0),
    tr(19, 20, '0, '0, 0), tr(20, 21, '0, '0, 0), tr(21, 22, '0, '0, 0),
    tr(22, 23, '0, '0, 0), tr(23, JOIN, '0, '0, 1),
    tr(JOIN, EXIT, '0, '0, 0),
    tr(EXIT, OUT, '0, '0, 0)
  };

  function automatic logic [NS-1:0][4:0] joins();
    logic [NS-1:0][4:0] j = '0;
    j[JOIN] = 5'd2;
    return j;
  endfunction

  function automatic logic [NS-1:0][NO-1:0] rom();
    logic [NS-1:0][NO-1:0] r = '0;
    for (int k = 0; k < NS; k++) begin
      r[k][k % NO] = 1'b1;
      if (k >= NO) r[k][NO-1] = 1'b1;
    end
    return r;
  endfunction

  localparam logic [NS-1:0][4:0]    JOINS = joins();
  localparam logic [NS-1:0][NO-1:0] ROM   = rom();

  logic clk = 1'b0, reset, start, ready;
  logic [NT-1:0] test;
  logic [NO-1:0] out;
  int checks = 0, failures = 0, n_wait = 0, n_l2 = 0, n_l3 = 0, n_r0 = 0, n_r1 = 0;

  always #5 clk = ~clk;

  mt_rom_controller #(
    .N_STATES(NS), .N_OUT(NO), .N_TESTS(NT), .N_TRANS(NTR),
    .TRANS(TABLE), .JOIN_INPUTS(JOINS), .CONTENT(ROM), .FINAL_STATE(OUT)
  ) dut (.clk(clk), .reset(reset), .start(start), .test(test), .cascade_in('0),
         .out(out), .ready(ready));

  // Reference: two thread program counters (-1 = idle, -2 = arrived at JOIN).
  int lpc, rpc, tail;   // tail: 0 idle, 1 ENTRY, 2 FORK, 3 JOIN, 4 EXIT, 5 IN, 6 OUT
  logic [NS-1:0] exp_q;

  function automatic int next_left(input int pc, input logic t0);
    case (pc)
      2: return 3; 3: return 4; 4: return t0 ? 5 : 7;
      5: return 6; 6: return 10; 7: return 8; 8: return 9; 9: return 10;
      10: return 11; 11: return -2;
      default: return pc;
    endcase
  endfunction
  function automatic int next_right(input int pc, input logic t1);
    case (pc)
      12: return 13; 13: return 14; 14: return 15; 15: return t1 ? 16 : 19;
      16: return 17; 17: return 18; 18: return 22; 19: return 20; 20: return 21;
      21: return 22; 22: return 23; 23: return -2;
      default: return pc;
    endcase
  endfunction

  function automatic logic [NS-1:0] expected();
    logic [NS-1:0] e = '0;
    if (lpc >= 0) e[lpc] = 1'b1;
    if (rpc >= 0) e[rpc] = 1'b1;
    case (tail)
      1: e[ENTRY] = 1'b1; 2: e[FORK] = 1'b1; 3: e[JOIN] = 1'b1; 4: e[EXIT] = 1'b1;
      5: e[IN] = 1'b1; 6: e[OUT] = 1'b1;
      default: ;
    endcase
    return e;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int lat;
    logic [NO-1:0] w;
    reset = 1'b1; start = 1'b0; test = '0;
    @(posedge clk); #1 reset = 1'b0;
    for (int run = 0; run < 40; run++) begin
      lpc = -1; rpc = -1; tail = 0;
      @(negedge clk); start = 1'b1;
      @(posedge clk); #1 start = 1'b0; tail = 5;
      lat = 1;
      while (tail != 6 && lat < 40) begin
        @(negedge clk); #1;
        exp_q = expected();
        w = '0;
        for (int k = 0; k < NS; k++) if (exp_q[k]) w |= ROM[k];
        chk(dut.q == exp_q, "active states");
        chk(out == w, "output word");
        chk(ready == 1'b0, "ready early");
        test = NT'($urandom);
        @(posedge clk); #1;
        // advance the reference
        if (lpc == 4) begin if (test[0]) n_l2++; else n_l3++; end
        if (rpc == 15) begin if (test[1]) n_r0++; else n_r1++; end
        if (lpc == -2 && rpc >= 0) n_wait++;
        case (tail)
          5: tail = 1;
          4: tail = 6;
          1: tail = 2;
          2: begin tail = 0; lpc = 2; rpc = 12; end
          3: tail = 4;
          default: begin
            lpc = next_left(lpc, test[0]);
            rpc = next_right(rpc, test[1]);
            if (lpc == -2 && rpc == -2) begin tail = 3; lpc = -1; rpc = -1; end
          end
        endcase
        lat++;
      end
      @(negedge clk); #1;
      chk(ready == 1'b1 && dut.q == (NS'(1) << OUT), "output state active");
      chk(lat == 15, "15 edges from start to the output state");
      @(negedge clk); #1;
      chk(dut.q == '0 && out == '0, "idle after exit");
    end
    chk(n_wait > 0 && n_l2 > 0 && n_l3 > 0 && n_r0 > 0 && n_r1 > 0, "all arms and the JOIN wait seen");
    $display("left arms %0d/%0d right arms %0d/%0d join waits %0d", n_l2, n_l3, n_r0, n_r1, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
