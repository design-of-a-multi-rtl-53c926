// state_control_logic: the next-state logic of the multi-thread controller.
//
// The state machine is a token-flow graph: each active state passes its
// token along its outgoing edges at every clock edge. The logic therefore
// only computes, for each latch, whether a token arrives:
//   - a direct edge from state x contributes q[x];
//   - an edge guarded by test signals contributes q[x] ANDed with each test
//     it cares about, true or inverted (several tests give multi-way
//     branches);
//   - several edges into one state are ORed (end of an if-construct, a loop
//     re-entry, the start input into the starting state);
//   - a state that ends concurrent sequences whose lengths are not known in
//     advance gets a join_wait block: its incoming edges are split over the
//     JOIN inputs, and the state becomes active only after every input has
//     delivered a token.
// A sequence of states is simply a chain q[x] -> d[x+1]; a fork is one q
// feeding several d; implicit synchronisation (tokens of faster sequences
// dropped) needs nothing beyond the plain edges.
//
// Configuration: TRANS lists the edges (see mtrc_pkg::transition_t), an edge
// with source SRC_START is fed by the start input, and JOIN_INPUTS[s] gives
// the number of JOIN inputs of state s (0 or 1: no JOIN). The defaults are
// the document's two-loop example machine.
//
// Timing: d is combinational from q, test and start; the JOIN cells update
// at the rising clock edge with the latches. Reset is held in the JOIN
// cells; the latch outputs are already forced low by reset.
//
// The mapping of edges to AND/OR terms and JOIN blocks is the one the
// document derives from its backward link trees; expressing it as a table
// and a generic module instead of generated structural code is this
// design's choice.
module state_control_logic
  import mtrc_pkg::*;
#(
  parameter int unsigned N_STATES = EXB_STATES,
  parameter int unsigned N_TESTS  = EXB_TESTS,
  parameter int unsigned N_TRANS  = EXB_TRANS,
  parameter transition_t [N_TRANS-1:0] TRANS = EXB_TABLE,
  parameter logic [N_STATES-1:0][4:0] JOIN_INPUTS = EXB_JOINS
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                start,  // places a token in the starting state
  input  logic [N_TESTS-1:0]  test,   // conditionals from the datapath
  input  logic [N_STATES-1:0] q,      // active states (latch outputs)
  output logic [N_STATES-1:0] d       // latch inputs
);

  logic [N_STATES-1:0]       or_in;   // OR of all incoming edges
  logic [N_STATES-1:0][15:0] join_in; // incoming edges per JOIN input

  // Token carried by one edge in this cycle.
  function automatic logic edge_token(input transition_t t,
                                      input logic [N_STATES-1:0] qv,
                                      input logic [N_TESTS-1:0] tv,
                                      input logic st);
    logic tok;
    logic [MAX_TESTS-1:0] tests;
    tests = MAX_TESTS'(tv);
    if (t.src == 8'(SRC_START)) tok = st;
    else if (32'(t.src) < N_STATES) tok = qv[t.src];
    else tok = 1'b0;
    // every test the edge cares about must have the required value
    if (((tests ^ t.val) & t.care) != '0) tok = 1'b0;
    return tok;
  endfunction

  always_comb begin
    or_in   = '0;
    join_in = '0;
    for (int i = 0; i < N_TRANS; i++) begin
      if (32'(TRANS[i].dst) < N_STATES) begin
        if (edge_token(TRANS[i], q, test, start)) begin
          or_in[TRANS[i].dst]                  = 1'b1;
          join_in[TRANS[i].dst][TRANS[i].jin] = 1'b1;
        end
      end
    end
  end

  for (genvar s = 0; s < N_STATES; s++) begin : g_state
    if (JOIN_INPUTS[s] >= 2) begin : g_join
      join_wait #(.N_IN(int'(JOIN_INPUTS[s]))) u_join (
        .clk  (clk),
        .reset(reset),
        .st   (q[s]),
        .in   (join_in[s][int'(JOIN_INPUTS[s])-1:0]),
        .out  (d[s])
      );
    end else begin : g_or
      assign d[s] = or_in[s];
    end
  end

endmodule
