// mt_rom_controller: a multi-thread ROM-based controller.
//
// The controller drives the control signals of a datapath from a ROM whose
// rows are the states of a state machine. Each row has its own latch, so any
// number of states can be active together: concurrent threads of the
// algorithm each hold a token, and the outputs are the OR of the ROM words of
// all active states. Next-state logic is just the token flow between
// latches (state_control_logic): chains for sequences, AND with a test
// signal for branches, OR for merges and loops, and JOIN wait logic where
// concurrent sequences of unknown length meet.
//
// Interface:
//   clk      core clock; a cycle starts at the rising edge. The first half
//            (clk high) precharges the ROM; outputs are 0 then.
//   reset    forces every state inactive; hold it for at least one rising
//            edge to clear the latches and JOIN cells.
//   start    a one here puts a token into the starting state next cycle.
//   test     conditionals from the datapath, sampled at the rising edge.
//   cascade_in outputs of a core stacked above this one (tie to 0 if none).
//   out      output word of all active states, valid in the second half of
//            each cycle, to be read at the next rising edge.
//   ready    the final state is active (token leaves the machine).
//
// Large machines: N_CORES > 1 spreads the states over several stacked ROM
// cores chained through their output lines (the outputs of one core pull
// down the output lines of the next), which keeps each core's lines short.
// The outputs are the same as with one core; only the layout changes.
//
// Default configuration: the document's two-loop example machine (eight
// states, tests a, b, c, four outputs) from mtrc_pkg. The document's example
// gives an all-zero output word for every state; the ROM words used here,
// one output per thread, are this design's own so that the outputs show the
// activity of the threads.
module mt_rom_controller
  import mtrc_pkg::*;
#(
  parameter int unsigned N_STATES    = EXB_STATES,
  parameter int unsigned N_OUT       = EXB_OUTS,
  parameter int unsigned N_TESTS     = EXB_TESTS,
  parameter int unsigned N_TRANS     = EXB_TRANS,
  parameter transition_t [N_TRANS-1:0] TRANS = EXB_TABLE,
  parameter logic [N_STATES-1:0][4:0] JOIN_INPUTS = EXB_JOINS,
  parameter logic [N_STATES-1:0][N_OUT-1:0] CONTENT = EXB_ROM,
  parameter int unsigned FINAL_STATE = ST_F,
  parameter int unsigned N_CORES     = 1
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               start,
  input  logic [N_TESTS-1:0] test,
  input  logic [N_OUT-1:0]   cascade_in,
  output logic [N_OUT-1:0]   out,
  output logic               ready
);

  logic [N_STATES-1:0] q;
  logic [N_STATES-1:0] d;

  state_control_logic #(
    .N_STATES   (N_STATES),
    .N_TESTS    (N_TESTS),
    .N_TRANS    (N_TRANS),
    .TRANS      (TRANS),
    .JOIN_INPUTS(JOIN_INPUTS)
  ) u_logic (
    .clk  (clk),
    .reset(reset),
    .start(start),
    .test (test),
    .q    (q),
    .d    (d)
  );

  // States are spread over N_CORES stacked ROM cores, ROWS_PER_CORE rows
  // each (the last core may have fewer). Each core's output lines are also
  // pulled down by the outputs of the core above it; the last core drives
  // the controller outputs.
  localparam int unsigned ROWS_PER_CORE = (N_STATES + N_CORES - 1) / N_CORES;

  logic [N_CORES:0][N_OUT-1:0] chain;
  assign chain[0] = cascade_in;
  assign out      = chain[N_CORES];

  for (genvar k = 0; k < N_CORES; k++) begin : g_core
    localparam int unsigned LO   = k * ROWS_PER_CORE;
    localparam int unsigned ROWS = (N_STATES - LO < ROWS_PER_CORE) ? N_STATES - LO
                                                                   : ROWS_PER_CORE;
    rom_core #(
      .N_STATES(ROWS),
      .N_OUT   (N_OUT),
      .CONTENT (CONTENT[LO +: ROWS])
    ) u_core (
      .clk       (clk),
      .reset     (reset),
      .d         (d[LO +: ROWS]),
      .cascade_in(chain[k]),
      .q         (q[LO +: ROWS]),
      .out       (chain[k+1])
    );
  end

  if (N_CORES == 0 || (N_CORES - 1) * ROWS_PER_CORE >= N_STATES || N_TESTS > MAX_TESTS)
  begin : g_bad_config
    $error("mt_rom_controller: N_CORES must leave every core at least one row, and N_TESTS may not exceed MAX_TESTS");
  end

  assign ready = q[FINAL_STATE];

endmodule
