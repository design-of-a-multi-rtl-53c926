// state_latch: the latch that drives one ROM row, i.e. one state of the
// controller. A state is active while its latch holds a one (it has a token).
//
// Function: a master-slave D flip-flop, here written as one register that
// takes D at the rising edge of clk, the start of a cycle. It has the two
// outputs of the latch cell: q, used by the state control logic, and rom_row,
// a copy of q forced low during the precharge phase, which drives the ROM row.
// Reset forces both outputs low but, as in the latch cell, does not clear the
// stored bit: with every q low the state control logic feeds zeros to all
// latches, so one clock edge under reset clears the stored state. The state
// control logic must therefore keep reset in every D term (join_wait does).
//
// Timing: q changes just after the rising clock edge and holds for the cycle.
// rom_row follows q when precharge is low (second half of the cycle).
//
// The cell's function, its two outputs, the reset behaviour and the
// precharge gating follow the latch schematics described for the ROM core;
// modelling the two-phase dynamic latch as one edge-triggered register is
// this design's choice (dynamic_flipflop_model keeps the two phases).
module state_latch (
  input  logic clk,        // cycle clock, rising edge starts a cycle
  input  logic reset,      // forces the outputs low
  input  logic precharge,  // high in the precharge (first) half of the cycle
  input  logic d,          // token arriving for the next cycle
  output logic q,          // state output to the state control logic
  output logic rom_row     // ROM row drive, low during precharge
);

  logic stored;

  always_ff @(posedge clk) stored <= d;

  always_comb begin
    q       = stored & ~reset;
    rom_row = q & ~precharge;
  end

endmodule
