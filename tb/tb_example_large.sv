// tb_example_large: a large multi-thread machine, 127 states and 137
// outputs, on three stacked ROM cores (43 + 42 + 42 rows).
//
// Machine: the entry state F forks into a long sequence A (36 states) and a
// branch state B. B chooses one of four sequences on the tests (test 0 = 1:
// arm 0, 18 states; else test 1 = 1: arm 1, 9 states; else test 2 = 1:
// arm 2, 33 states; else arm 3, 17 states), which merge in M, followed by
// one state S. A JOIN J1 waits for A and S, then F2 forks into eight single
// states P0..P7 that meet again in an eight-input JOIN J2, the final state.
// Arm 2 makes A and S arrive at J1 in the same cycle; the other arms make
// J1 hold S's token until A ends.
//
// The reference model is a schedule: the cycle in which each state is
// active follows from the arm lengths (A_i in cycle 1+i, arm state j in
// cycle 2+j, M and S after the arm, J1 one cycle after the later of A and
// S, then F2, P*, J2). Checked every cycle: the active states, the 137-bit
// output word (the OR of two ROM columns per state, with words from all
// three cores), ready, and the cycle of ready.
module tb_example_large;
  import mtrc_pkg::*;
  localparam int unsigned LA = 36;
  localparam int unsigned LK [4] = '{18, 9, 33, 17};
  localparam int unsigned ST_F = 0, A0 = 1, ST_B = A0 + LA;
  localparam int unsigned ARM0 = ST_B + 1, ARM1 = ARM0 + 18, ARM2 = ARM1 + 9,
                          ARM3 = ARM2 + 33, ST_M = ARM3 + 17, ST_S = ST_M + 1,
                          J1 = ST_S + 1, F2 = J1 + 1, P0 = F2 + 1, J2 = P0 + 8;
  localparam int unsigned NS = J2 + 1;                 // 127
  localparam int unsigned NO = 137, NT = 3;
  localparam int unsigned ARMB [4] = '{ARM0, ARM1, ARM2, ARM3};
  localparam int unsigned NTR = 1 + 2 + (LA - 1) + 1 + 4 + 77 + 3 + 16;  // 139 edges

  function automatic transition_t [NTR-1:0] table_build();
    transition_t [NTR-1:0] t;
    int n = 0;
    t[n++] = tr(SRC_START, ST_F, '0, '0, 0);
    t[n++] = tr(ST_F, A0, '0, '0, 0);
    t[n++] = tr(ST_F, ST_B, '0, '0, 0);
    for (int i = 0; i < LA - 1; i++) t[n++] = tr(A0 + i, A0 + i + 1, '0, '0, 0);
    t[n++] = tr(A0 + LA - 1, J1, '0, '0, 0);                       // JOIN input 0
    t[n++] = tr(ST_B, ARM0, 16'h1, 16'h1, 0);                      // t0
    t[n++] = tr(ST_B, ARM1, 16'h3, 16'h2, 0);                      // !t0 t1
    t[n++] = tr(ST_B, ARM2, 16'h7, 16'h4, 0);                      // !t0 !t1 t2
    t[n++] = tr(ST_B, ARM3, 16'h7, 16'h0, 0);                      // !t0 !t1 !t2
    for (int k = 0; k < 4; k++) begin
      for (int j = 0; j < LK[k] - 1; j++) t[n++] = tr(ARMB[k] + j, ARMB[k] + j + 1, '0, '0, 0);
      t[n++] = tr(ARMB[k] + LK[k] - 1, ST_M, '0, '0, 0);
    end
    t[n++] = tr(ST_M, ST_S, '0, '0, 0);
    t[n++] = tr(ST_S, J1, '0, '0, 1);                              // JOIN input 1
    t[n++] = tr(J1, F2, '0, '0, 0);
    for (int p = 0; p < 8; p++) t[n++] = tr(F2, P0 + p, '0, '0, 0);
    for (int p = 0; p < 8; p++) t[n++] = tr(P0 + p, J2, '0, '0, p);
    return t;
  endfunction

  function automatic logic [NS-1:0][4:0] joins();
    logic [NS-1:0][4:0] j = '0;
    j[J1] = 5'd2;
    j[J2] = 5'd8;
    return j;
  endfunction

  function automatic logic [NS-1:0][NO-1:0] rom();
    logic [NS-1:0][NO-1:0] r = '0;
    for (int k = 0; k < NS; k++) begin
      r[k][(k * 7) % NO] = 1'b1;
      r[k][(k * 13 + 5) % NO] = 1'b1;
    end
    return r;
  endfunction

  localparam transition_t [NTR-1:0] TABLE = table_build();
  localparam logic [NS-1:0][4:0]    JOINS = joins();
  localparam logic [NS-1:0][NO-1:0] ROM   = rom();

  logic clk = 1'b0, reset, start, ready;
  logic [NT-1:0] test;
  logic [NO-1:0] out;
  int checks = 0, failures = 0;
  int arm_seen [4] = '{0, 0, 0, 0};
  int n_simul = 0, n_wait = 0;

  always #5 clk = ~clk;

  mt_rom_controller #(
    .N_STATES(NS), .N_OUT(NO), .N_TESTS(NT), .N_TRANS(NTR), .TRANS(TABLE),
    .JOIN_INPUTS(JOINS), .CONTENT(ROM), .FINAL_STATE(J2), .N_CORES(3)
  ) dut (.clk(clk), .reset(reset), .start(start), .test(test), .cascade_in('0),
         .out(out), .ready(ready));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what, input int e);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s in cycle %0d at %0t", what, e, $time); end
  endtask

  // Active states in cycle e (after edge e) when arm k was chosen.
  function automatic logic [NS-1:0] expected(input int e, input int k);
    logic [NS-1:0] x = '0;
    int j1e;
    if (e == 1) x[ST_F] = 1'b1;
    if (e == 2) x[ST_B] = 1'b1;
    for (int i = 1; i <= LA; i++) if (e == 1 + i) x[A0 + i - 1] = 1'b1;
    if (k >= 0) begin
      for (int j = 1; j <= LK[k]; j++) if (e == 2 + j) x[ARMB[k] + j - 1] = 1'b1;
      if (e == 3 + LK[k]) x[ST_M] = 1'b1;
      if (e == 4 + LK[k]) x[ST_S] = 1'b1;
      j1e = ((1 + LA > 4 + LK[k]) ? 1 + LA : 4 + LK[k]) + 1;
      if (e == j1e) x[J1] = 1'b1;
      if (e == j1e + 1) x[F2] = 1'b1;
      if (e == j1e + 2) x[P0 +: 8] = '1;
      if (e == j1e + 3) x[J2] = 1'b1;
    end
    return x;
  endfunction

  initial begin
    int k, e, last;
    logic [NS-1:0] xq;
    logic [NO-1:0] w;
    reset = 1'b1; start = 1'b0; test = '0;
    @(posedge clk); #1 reset = 1'b0;
    for (int run = 0; run < 16; run++) begin
      k = -1;
      @(negedge clk); start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      e = 1;
      last = 0;
      while (e < 60 && last == 0) begin
        @(negedge clk); #1;
        xq = expected(e, k);
        w = '0;
        for (int s = 0; s < NS; s++) if (xq[s]) w |= ROM[s];
        chk(dut.q == xq, "active states", e);
        chk(out == w, "output word", e);
        chk(ready == xq[J2], "ready", e);
        if (xq[J2]) last = e;
        test = (run < 4) ? NT'(run == 0 ? 3'b001 : run == 1 ? 3'b010 : run == 2 ? 3'b100 : 3'b000)
                         : NT'($urandom);
        @(posedge clk); #1;
        if (e == 2) begin
          k = test[0] ? 0 : test[1] ? 1 : test[2] ? 2 : 3;
          arm_seen[k]++;
          if (4 + LK[k] == 1 + LA) n_simul++; else n_wait++;
        end
        e++;
      end
      chk(last == ((1 + LA > 4 + LK[k]) ? 1 + LA : 4 + LK[k]) + 4, "cycle of ready", last);
      @(negedge clk); #1;
      chk(dut.q == '0 && out == '0, "idle after the final state", e);
    end
    chk(arm_seen[0] > 0 && arm_seen[1] > 0 && arm_seen[2] > 0 && arm_seen[3] > 0 &&
        n_simul > 0 && n_wait > 0, "all arms, JOIN wait and simultaneous arrival seen", 0);
    $display("arms %0d %0d %0d %0d, J1 simultaneous %0d, J1 waited %0d",
             arm_seen[0], arm_seen[1], arm_seen[2], arm_seen[3], n_simul, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
