// tb_example_flat: a single-thread (flat) machine on the controller: 30
// states, 15 outputs, two tests, never more than one active state.
//
// Machine: input state I, three states S1..S3, branch B0 on test 0 into
// state a (test 0 = 1) or b; a branches on test 1 (state Ba) into columns
// 1 (test 1 = 1) or 3, b (state Bb) into columns 2 (test 1 = 1) or 4; each
// column has three states. Columns 1 and 2 merge in M1, columns 3 and 4 in
// M2; each merge is followed by two states, then both paths merge in M3,
// one more state S and the output (final) state O. Every path has the same
// length, so ready comes 16 edges after start is sampled.
//
// The reference model walks the path chosen by the tests; the test checks
// that exactly that one state is active each cycle (one-hot), the output
// word (ROM word of state k: outputs k mod 15 and (k + 7) mod 15), ready
// and its cycle, and that all four columns were used.
module tb_example_flat;
  import mtrc_pkg::*;
  localparam int unsigned NO = 15, NT = 2;
  // state numbers
  localparam int unsigned I = 0, S1 = 1, S2 = 2, S3 = 3, B0 = 4, SA = 5, SB = 6,
                          C1 = 7, C2 = 10, C3 = 13, C4 = 16,      // 3 states each
                          M1 = 19, M1A = 20, M1B = 21, M2 = 22, M2A = 23, M2B = 24,
                          M3 = 25, SS = 26, O = 27, BA = 28, BB = 29;
  localparam int unsigned NS = 30;
  localparam int unsigned NTR = 33;
  localparam logic [MAX_TESTS-1:0] T0 = 16'h1, T1 = 16'h2;

  localparam transition_t [NTR-1:0] TABLE = '{
    tr(SRC_START, I, '0, '0, 0),
    tr(I, S1, '0, '0, 0), tr(S1, S2, '0, '0, 0), tr(S2, S3, '0, '0, 0), tr(S3, B0, '0, '0, 0),
    tr(B0, SA, T0, T0, 0), tr(B0, SB, T0, '0, 0),
    tr(SA, BA, '0, '0, 0), tr(SB, BB, '0, '0, 0),
    tr(BA, C1, T1, T1, 0), tr(BA, C3, T1, '0, 0),
    tr(BB, C2, T1, T1, 0), tr(BB, C4, T1, '0, 0),
    tr(C1, C1 + 1, '0, '0, 0), tr(C1 + 1, C1 + 2, '0, '0, 0), tr(C1 + 2, M1, '0, '0, 0),
    tr(C2, C2 + 1, '0, '0, 0), tr(C2 + 1, C2 + 2, '0, '0, 0), tr(C2 + 2, M1, '0, '0, 0),
    tr(C3, C3 + 1, '0, '0, 0), tr(C3 + 1, C3 + 2, '0, '0, 0), tr(C3 + 2, M2, '0, '0, 0),
    tr(C4, C4 + 1, '0, '0, 0), tr(C4 + 1, C4 + 2, '0, '0, 0), tr(C4 + 2, M2, '0, '0, 0),
    tr(M1, M1A, '0, '0, 0), tr(M1A, M1B, '0, '0, 0), tr(M1B, M3, '0, '0, 0),
    tr(M2, M2A, '0, '0, 0), tr(M2A, M2B, '0, '0, 0), tr(M2B, M3, '0, '0, 0),
    tr(M3, SS, '0, '0, 0), tr(SS, O, '0, '0, 0)
  };

  function automatic logic [NS-1:0][NO-1:0] rom();
    logic [NS-1:0][NO-1:0] r = '0;
    for (int k = 0; k < NS; k++) begin
      r[k][k % NO] = 1'b1;
      r[k][(k + 7) % NO] = 1'b1;
    end
    return r;
  endfunction
  localparam logic [NS-1:0][NO-1:0] ROM = rom();

  logic clk = 1'b0, reset, start, ready;
  logic [NT-1:0] test;
  logic [NO-1:0] out;
  int checks = 0, failures = 0;
  int col_seen [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  mt_rom_controller #(
    .N_STATES(NS), .N_OUT(NO), .N_TESTS(NT), .N_TRANS(NTR), .TRANS(TABLE),
    .JOIN_INPUTS('0), .CONTENT(ROM), .FINAL_STATE(O)
  ) dut (.clk(clk), .reset(reset), .start(start), .test(test), .cascade_in('0),
         .out(out), .ready(ready));

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

  // Path of states, cycle 1 .. 16, for the choices of the two branches.
  function automatic int path(input int e, input bit t0, input bit t1);
    int col;
    col = t0 ? (t1 ? C1 : C3) : (t1 ? C2 : C4);
    case (e)
      1: return I; 2: return S1; 3: return S2; 4: return S3; 5: return B0;
      6: return t0 ? SA : SB;
      7: return t0 ? BA : BB;
      8: return col; 9: return col + 1; 10: return col + 2;
      11: return t1 ? M1 : M2; 12: return t1 ? M1A : M2A; 13: return t1 ? M1B : M2B;
      14: return M3; 15: return SS; 16: return O;
      default: return -1;
    endcase
  endfunction

  initial begin
    bit t0, t1;
    int st;
    reset = 1'b1; start = 1'b0; test = '0;
    @(posedge clk); #1 reset = 1'b0;
    for (int run = 0; run < 24; run++) begin
      t0 = 1'b0; t1 = 1'b0;
      @(negedge clk); start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      for (int e = 1; e <= 16; e++) begin
        @(negedge clk); #1;
        st = path(e, t0, t1);
        chk(dut.q == (NS'(1) << st), "one-hot active state");
        chk(out == ROM[st], "output word");
        chk(ready == (st == O), "ready");
        test = NT'($urandom);
        @(posedge clk); #1;
        if (e == 5) t0 = test[0];   // leaving B0
        if (e == 7) t1 = test[1];   // leaving Ba or Bb
      end
      col_seen[{t0, t1}]++;
      @(negedge clk); #1;
      chk(dut.q == '0, "idle after the output state");
    end
    chk(col_seen[0] > 0 && col_seen[1] > 0 && col_seen[2] > 0 && col_seen[3] > 0, "all four columns used");
    $display("columns %0d %0d %0d %0d", col_seen[3], col_seen[1], col_seen[2], col_seen[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
