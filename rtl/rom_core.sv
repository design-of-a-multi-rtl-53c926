// rom_core: the ROM core of the multi-thread controller: one state latch per
// ROM row, the ROM matrix with its precharged output lines and output
// buffers, and the precharge timing.
//
// Where a conventional ROM controller decodes a binary state register into
// exactly one active row, here every row has its own latch, so any number of
// rows (states, tokens) can be active in the same cycle and the outputs are
// the OR of the words of all active rows. The latch inputs d come from the
// state control logic; the latch outputs q go back to it.
//
// Clocking: clk is the clock as seen inside the core, i.e. after the input
// inverters of the clock regulation; a cycle starts at its rising edge. The
// first half of the cycle (clk high) is the precharge phase, during which
// the ROM rows are held low and the outputs are 0; in the second half the
// outputs show the words of the active states, to be read at the start of
// the next cycle. q is valid for the whole cycle.
//
// cascade_in lets a second core be stacked below this one: this core's
// output lines are then also pulled down by the outputs of the core above
// (tie to zero when unused).
//
// Organisation, phases and the inter-core buffer follow the document; the
// default 52 x 100 size is the ROM-core size it names as the best one.
module rom_core #(
  parameter int unsigned N_STATES = 52,
  parameter int unsigned N_OUT    = 100,
  parameter logic [N_STATES-1:0][N_OUT-1:0] CONTENT =
      {N_STATES{N_OUT'({(N_OUT+1)/2{2'b01}})}}
) (
  input  logic                clk,
  input  logic                reset,       // forces all latch outputs low
  input  logic [N_STATES-1:0] d,           // latch inputs, next active states
  input  logic [N_OUT-1:0]    cascade_in,  // outputs of a core stacked above
  output logic [N_STATES-1:0] q,           // active states
  output logic [N_OUT-1:0]    out          // output word of all active states
);

  logic                precharge;
  logic [N_STATES-1:0] row;

  // Clock regulation: the precharge line is driven in the first half cycle.
  assign precharge = clk;

  for (genvar s = 0; s < N_STATES; s++) begin : g_latch
    state_latch u_latch (
      .clk      (clk),
      .reset    (reset),
      .precharge(precharge),
      .d        (d[s]),
      .q        (q[s]),
      .rom_row  (row[s])
    );
  end

  rom_matrix #(
    .ROWS   (N_STATES),
    .COLS   (N_OUT),
    .CONTENT(CONTENT)
  ) u_matrix (
    .precharge (precharge),
    .row       (row),
    .cascade_in(cascade_in),
    .out       (out)
  );

endmodule
