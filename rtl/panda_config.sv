// Configuration interface of the PANDA programmable analog array.
//
// Connects the SPI slave, the row and column address decoders, the 16 KB
// configuration memory and the test registers. A write frame to address
// space 0 stores its byte at (row, column) of the configuration memory; a
// write to space 1 stores it in test register column[2:0]; a read frame
// returns that test register on MISO (reads of the configuration memory
// return zero). Everything runs on the SPI clock; rst_n clears the
// configuration and the test registers. cfg carries every configuration
// bit to the analog array (cell widths, connection and switch blocks).
// See spi_slave and panda_pkg for the frame format and timing.
module panda_config
  import panda_pkg::*;
#(
  parameter int unsigned NUM_TEST_REGS = 8
) (
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  output logic [7:0] cfg [ROWS][COLS],
  output logic [7:0] test_q [NUM_TEST_REGS]
);
  localparam int unsigned TA = $clog2(NUM_TEST_REGS);

  spi_hdr_t        hdr;
  logic            wr_en, hdr_valid;
  logic [7:0]      wdata, rd_data, treg_rd;
  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0] col_sel;

  spi_slave u_spi (
    .rst_n, .sclk, .cs_n, .mosi, .miso, .wr_en, .hdr, .hdr_valid, .wdata, .rd_data);

  addr_decoder u_dec (
    .en(wr_en && !hdr.space), .row(hdr.row), .col(hdr.col), .row_sel, .col_sel);

  config_memory u_mem (
    .clk(sclk), .rst_n, .we(wr_en && !hdr.space), .row_sel, .col_sel, .wdata, .cfg);

  test_regs #(.NUM_REGS(NUM_TEST_REGS)) u_treg (
    .clk(sclk), .rst_n, .we(wr_en && hdr.space), .waddr(hdr.col[TA-1:0]), .wdata,
    .raddr(hdr.col[TA-1:0]), .rd_data(treg_rd), .regs(test_q));

  assign rd_data = hdr.space ? treg_rd : 8'h00;
endmodule
