// Configuration memory of the PANDA array.
//
// 256 rows x 64 columns of bytes (16 KB), written one byte at a time through
// the row and column select lines of the address decoders, and never read
// back over SPI: every bit drives a transistor-width control or a routing
// switch of the analog array, so the whole contents are outputs (cfg). On
// the chip the bytes are spread over the tiles, next to the switches they
// control. Any byte can be rewritten at any time, which gives the partial,
// dynamic reconfiguration used for trimming and offset cancellation. Reset
// clears every byte, so a reset array has all switches open.
//
// Byte addressing, 8 row and 6 column address bits and write-only access
// follow the chip description; clearing on reset is this design's reading
// of "performs the functionality ... till power down, reset or
// reconfiguration". Written on the rising SPI clock edge when we is high.
module config_memory
  import panda_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [ROWS-1:0] row_sel,
  input  logic [COLS-1:0] col_sel,
  input  logic [7:0]      wdata,
  output logic [7:0]      cfg [ROWS][COLS]
);
  // The selects are one-hot; their set bits give the byte to write.
  logic [ROW_W-1:0] ridx;
  logic [COL_W-1:0] cidx;
  always_comb begin
    ridx = '0;
    cidx = '0;
    for (int r = 0; r < ROWS; r++) if (row_sel[r]) ridx = ROW_W'(r);
    for (int c = 0; c < COLS; c++) if (col_sel[c]) cidx = COL_W'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) cfg[r][c] <= '0;
    end else if (we && (|row_sel) && (|col_sel)) begin
      cfg[ridx][cidx] <= wdata;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) we |-> ($countones(row_sel) == 1 && $countones(col_sel) == 1));
endmodule
