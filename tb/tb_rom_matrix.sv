// tb_rom_matrix: self-checking test of the ROM matrix with precharge and
// output buffers. A 7 x 11 matrix with a fixed irregular content is driven
// with random sets of active rows (including none and several) and random
// cascade inputs; the expected word is built row by row from the content.
module tb_rom_matrix;
  localparam int unsigned R = 7;
  localparam int unsigned C = 11;
  localparam logic [R-1:0][C-1:0] CT = '{
    11'b000_0000_0001, 11'b100_0000_0000, 11'b010_1010_1010, 11'b001_0011_0001,
    11'b000_0000_0000, 11'b111_1000_0110, 11'b000_0101_0000
  };
  logic precharge;
  logic [R-1:0] row;
  logic [C-1:0] cas, out, exp;
  int checks = 0, failures = 0;

  rom_matrix #(.ROWS(R), .COLS(C), .CONTENT(CT)) dut (
    .precharge(precharge), .row(row), .cascade_in(cas), .out(out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      precharge = ($urandom % 4) == 0;
      case (i % 3)
        0: row = R'(1) << ($urandom % R);    // one thread
        1: row = R'($urandom);               // many threads
        default: row = (i % 7 == 0) ? '0 : R'($urandom) & R'($urandom);
      endcase
      cas = (i % 5 == 0) ? C'($urandom) : '0;
      exp = '0;
      if (!precharge) begin
        for (int r = 0; r < R; r++) if (row[r]) exp |= CT[r];
        exp |= cas;
      end
      #1;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL rows=%b pre=%0b cas=%b out=%b exp=%b", row, precharge, cas, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
