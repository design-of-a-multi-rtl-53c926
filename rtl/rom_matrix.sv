// rom_matrix: the ROM matrix of the controller together with the logical
// effect of its precharger and output buffers.
//
// Function: every output line is precharged high in the precharge phase.
// In the evaluate phase each active row discharges the lines of the columns
// where it has a transistor, and an inverting output buffer turns a
// discharged line into a one. So out[c] is 0 during precharge and otherwise
// the OR, over all active rows r, of CONTENT[r][c]. Several active rows
// (several threads) simply OR their words, as parallel pull-down
// transistors do. CONTENT[r][c] = 1 marks a transistor in row r, column c.
//
// cascade_in models the buffer between two stacked ROM cores: the output of
// an upper core pulls down this core's output lines through one transistor
// per column, so it ORs into the outputs. Tie it to zero for a single core.
//
// Interface: row[ROWS] word lines (from state_latch.rom_row), out[COLS].
// Timing: combinational; the outputs are valid in the second half of the
// cycle and are read at the start of the next cycle.
//
// The NOR-matrix organisation, the precharge/evaluate phases, the output
// inversion and the output-line buffer between cores follow the document's
// ROM core; the default size of 52 rows (states) by 100 columns (outputs) is
// the size it names as the best one. The default content, every second column
// filled in every row, is only a placeholder: every controller sets its own.
module rom_matrix #(
  parameter int unsigned ROWS = 52,
  parameter int unsigned COLS = 100,
  parameter logic [ROWS-1:0][COLS-1:0] CONTENT = {ROWS{COLS'({(COLS+1)/2{2'b01}})}}
) (
  input  logic            precharge,   // 1: output lines being precharged
  input  logic [ROWS-1:0] row,         // word lines, one per state
  input  logic [COLS-1:0] cascade_in,  // outputs of a core stacked above
  output logic [COLS-1:0] out          // buffered outputs to the datapath
);

  // Output lines, high = charged. A line is pulled low by any active row
  // with a transistor in its column, or by the cascade transistor.
  logic [COLS-1:0] line;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    // transistors of this column, one bit per row
    logic [ROWS-1:0] column;
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      assign column[r] = CONTENT[r][c];
    end
    assign line[c] = precharge | ~(|(row & column) | cascade_in[c]);
  end

  assign out = ~line;  // inverting output buffers

endmodule
