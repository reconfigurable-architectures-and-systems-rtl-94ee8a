// Constants and the SPI frame layout of the PANDA configuration interface.
//
// The configuration memory is addressed by an 8-bit row and a 6-bit column
// address (16 KB), as on the chip. The frame format is this design's own,
// since the protocol is only described as a customised SPI: 24 bits, most
// significant bit first, SPI mode 0 (data sampled on the rising SCLK edge,
// changed on the falling edge), framed by an active-low chip select:
//   bit 23      1 = write, 0 = read
//   bit 22      address space: 0 = configuration memory, 1 = test registers
//   bits 21:14  row address
//   bits 13:8   column address
//   bits 7:0    data (MOSI on a write; MISO returns the register on a read)
// The configuration memory is write-only; a read of it returns zero.
package panda_pkg;
  localparam int unsigned ROW_W = 8;
  localparam int unsigned COL_W = 6;
  localparam int unsigned ROWS  = 2 ** ROW_W;
  localparam int unsigned COLS  = 2 ** COL_W;
  localparam int unsigned FRAME_BITS = 24;
  localparam int unsigned HDR_BITS   = 16;

  typedef struct packed {
    logic             wr;
    logic             space;   // 0: configuration memory, 1: test registers
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
  } spi_hdr_t;
endpackage
