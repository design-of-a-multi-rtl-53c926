// mtrc_pkg: types and constants shared by the multi-thread ROM controller.
//
// A controller is described by a table of state transitions, one entry per
// edge of the token-flow graph, as in a symbolic state table: source state,
// target state and, for every test signal, whether the edge needs it to be
// 1, 0 or does not care (care/val masks). A source of SRC_START stands for the external start input, which
// places the first token in the starting state. Each entry also names the
// input of the target state's JOIN block it feeds; for a state without a JOIN
// that field is ignored and all incoming edges are ORed (an end-if merge).
// The field widths bound a controller to 255 states, 16 test signals and
// 16-input JOIN blocks; these limits are this design's own choice.
package mtrc_pkg;

  // Largest number of test signals a transition can look at.
  localparam int unsigned MAX_TESTS = 16;

  // Source value that denotes the external start input.
  localparam int unsigned SRC_START = 255;

  typedef struct packed {
    logic [7:0]           src;   // source state (ROM row), or SRC_START
    logic [7:0]           dst;   // target state (ROM row)
    logic [MAX_TESTS-1:0] care;  // tests this edge depends on (others '?')
    logic [MAX_TESTS-1:0] val;   // required values of those tests
    logic [3:0]           jin;   // JOIN input at the target, when it has a JOIN
  } transition_t;

  // Build a transition entry. care = 0 gives an unconditional edge.
  function automatic transition_t tr(input int unsigned src, input int unsigned dst,
                                     input logic [MAX_TESTS-1:0] care,
                                     input logic [MAX_TESTS-1:0] val,
                                     input int unsigned jin);
    transition_t t;
    t.src  = src[7:0];
    t.dst  = dst[7:0];
    t.care = care;
    t.val  = val;
    t.jin  = jin[3:0];
    return t;
  endfunction

  // ---------------------------------------------------------------------
  // Default controller: the two-loop example state machine.
  //
  // From the start state S three edges leave at once: the thread u0 -> u1
  // (looping back to u0 while b is 1) always starts, and either t0 (a = 1)
  // or the loop e0 -> e1 -> e2 (a = 0; back to e0 while c is 1) runs next to
  // it. The final state F is entered through a JOIN that waits for the
  // u-thread (input 0) and for the end of the if-construct t0 / e-loop
  // (input 1). Test signals: 0 = a, 1 = b, 2 = c.
  // ---------------------------------------------------------------------
  localparam int unsigned EXB_STATES = 8;
  localparam int unsigned EXB_OUTS   = 4;
  localparam int unsigned EXB_TESTS  = 3;
  localparam int unsigned EXB_TRANS  = 12;

  // ROM rows (state numbers) of the example.
  localparam int unsigned ST_S = 0, ST_U0 = 1, ST_U1 = 2, ST_E0 = 3,
                          ST_E1 = 4, ST_E2 = 5, ST_T0 = 6, ST_F = 7;

  localparam logic [MAX_TESTS-1:0] M_A = 16'h1, M_B = 16'h2, M_C = 16'h4;

  //                                            src        dst    care val  JOIN input
  localparam transition_t [EXB_TRANS-1:0] EXB_TABLE = '{
    tr(SRC_START, ST_S,  '0,  '0,  0),
    tr(ST_S,      ST_U0, '0,  '0,  0),
    tr(ST_S,      ST_E0, M_A, '0,  0),   // a = 0
    tr(ST_S,      ST_T0, M_A, M_A, 0),   // a = 1
    tr(ST_U0,     ST_U1, '0,  '0,  0),
    tr(ST_U1,     ST_U0, M_B, M_B, 0),   // b = 1: loop
    tr(ST_U1,     ST_F,  M_B, '0,  0),   // b = 0: leave, JOIN input 0
    tr(ST_E0,     ST_E1, '0,  '0,  0),
    tr(ST_E1,     ST_E2, '0,  '0,  0),
    tr(ST_E2,     ST_E0, M_C, M_C, 0),   // c = 1: loop
    tr(ST_E2,     ST_F,  M_C, '0,  1),   // c = 0: leave, JOIN input 1
    tr(ST_T0,     ST_F,  '0,  '0,  1)
  };

  // Number of JOIN inputs per state (0: plain OR of the incoming edges).
  localparam logic [EXB_STATES-1:0][4:0] EXB_JOINS = '{
    ST_F: 5'd2, default: 5'd0
  };

  // ROM words, one per state, bit c = output c. Output 0 marks the u-thread,
  // output 1 the e-loop, output 2 state t0, output 3 the states S and F.
  localparam logic [EXB_STATES-1:0][EXB_OUTS-1:0] EXB_ROM = '{
    ST_S: 4'b1000, ST_U0: 4'b0001, ST_U1: 4'b0001, ST_E0: 4'b0010,
    ST_E1: 4'b0010, ST_E2: 4'b0010, ST_T0: 4'b0100, ST_F: 4'b1000
  };

endpackage
