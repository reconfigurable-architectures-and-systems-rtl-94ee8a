// Row and column address decoders of the PANDA configuration memory.
//
// Turn the 8-bit row and 6-bit column address of a configuration write into
// one-hot select lines: one row line per memory row running across the
// array and one column line per byte column, so that exactly one byte cell,
// the one at the crossing, is written. All lines are low when en is low.
// Combinational. The split into a row and a column decoder with 8 and 6
// address bits follows the chip description; the one-hot form is the
// ordinary way to drive such word lines.
module addr_decoder
  import panda_pkg::*;
(
  input  logic             en,
  input  logic [ROW_W-1:0] row,
  input  logic [COL_W-1:0] col,
  output logic [ROWS-1:0]  row_sel,
  output logic [COLS-1:0]  col_sel
);
  always_comb begin
    row_sel = '0;
    col_sel = '0;
    if (en) begin
      row_sel[row] = 1'b1;
      col_sel[col] = 1'b1;
    end
  end
endmodule
