// join_wait: wait logic that explicitly synchronises N_IN concurrent
// sequences before the state that follows them (the JOIN block).
//
// Function: each input carries the token of one sequence arriving at the
// merge. A set/reset cell per input remembers that its token has arrived:
// x[i] = (in[i] | held[i]) & ~st & ~reset. When every x[i] is one the
// output passes one token to the following state's latch. In the next cycle
// that state is active (st = 1), which clears all cells, so the block is
// ready for the next time the construct runs. Reset clears the cells too.
//
// Interface: in[N_IN] tokens, st = q of the following state, out = its D.
// Timing: out is combinational from in; a token arriving in the same cycle
// as the last missing one is counted in that cycle; the cells update at the
// rising clock edge, like the state latches.
//
// The cell equation and the clearing by the following state follow the
// document's wait-logic schematic. The document builds the cell as a
// clock-gated NOR latch; storing it in a flip-flop at the cycle boundary is
// this design's choice and gives the same behaviour cycle by cycle. The
// document's block has two inputs; wider joins, which it builds from
// several two-input blocks in series, are one block here with N_IN inputs.
module join_wait #(
  parameter int unsigned N_IN = 2
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            st,    // the state following the join is active
  input  logic [N_IN-1:0] in,    // arriving tokens
  output logic            out    // token for the following state
);

  logic [N_IN-1:0] held;
  logic [N_IN-1:0] x;

  always_comb begin
    x   = (in | held) & {N_IN{~st & ~reset}};
    out = &x;
  end

  always_ff @(posedge clk) held <= x;

endmodule
