// dynamic_flipflop_model: behavioural model (not synthesizable logic) of the
// dynamic master-slave latch that drives one ROM row in the preferred
// version of the ROM core.
//
// The circuit is a chain: transmission gate opened by clk1, inverter
// (charge held on its input while clk1 is low), transmission gate opened by
// clk2, a NOR with reset (the Q output, also used by the state control
// logic), an inverter, and a wide NOR with precharge that drives the poly
// row line of the ROM. So Q = D sampled in the clk1 phase, passed on in the
// clk2 phase, forced low by reset; rom = Q forced low during precharge. The
// two clocks must not overlap: while both are high D runs straight through
// to Q, which can make a token skip a state. The model reproduces that.
// Stored charge is modelled as ideal (no leakage, so no minimum clock rate).
//
// Interface: clk1, clk2 are the internal, non-overlapping, active-high
// phase clocks (after the clock regulation's input inverters); a cycle
// starts with clk1. Gate delays of 1 time unit are illustrative only.
//
// The two level-sensitive always blocks infer latches on purpose: they are
// the charge-storage nodes behind the transmission gates.
//
// The gate chain follows the document's latch schematic and text; the
// delays and the ideal charge storage are this model's own.
module dynamic_flipflop_model (
  input  logic clk1,
  input  logic clk2,
  input  logic reset,
  input  logic precharge,
  input  logic d,
  output logic q,
  output logic rom
);

  logic master_n;  // output of the first inverter (charge on its input)
  logic slave_n;   // node behind the second transmission gate

  // Transmission gates: transparent while their clock is high, holding the
  // stored charge otherwise.
  always @(clk1 or d) if (clk1) master_n = ~d;
  always @(clk2 or master_n) if (clk2) slave_n = master_n;

  assign #1 q   = ~(slave_n | reset);     // NOR with reset
  assign #1 rom = ~((~q) | precharge);    // inverter, NOR with precharge

endmodule
