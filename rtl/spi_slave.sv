// SPI slave of the PANDA configuration interface.
//
// Receives the configuration bit-stream sent by the host through a
// USB-to-SPI bridge. It runs on the SPI clock itself; chip select high
// clears the bit counter, so every frame starts cleanly. The first 16 bits
// (command, address space, row, column; see panda_pkg) are shifted in and
// kept in an address buffer once complete. On a write, the rising SCLK edge
// of the 24th bit is the write cycle: wr_en is high during the bit period
// before it and wdata is the byte formed with the final MOSI bit, so the
// memory or test register is written at that edge. On a read, the
// addressed register (rd_data) is loaded on the falling edge after the
// header and shifted out on MISO, MSB first, one bit per falling edge.
// MISO is low outside a read. Frames shorter than 24 bits write nothing.
//
// An SPI slave with row/column address decoding and address/data buffers,
// write-only access to the configuration memory and read/write access to
// test registers follow the chip description; the frame format, mode 0 and
// the timing above are this design's choices.
module spi_slave
  import panda_pkg::*;
(
  input  logic             rst_n,
  input  logic             sclk,
  input  logic             cs_n,
  input  logic             mosi,
  output logic             miso,
  output logic             wr_en,     // write at the next rising SCLK edge
  output spi_hdr_t         hdr,       // address buffer of the current frame
  output logic             hdr_valid, // header complete
  output logic [7:0]       wdata,
  input  logic [7:0]       rd_data    // register addressed by hdr
);
  logic [4:0]  bitcnt;
  logic [14:0] shreg;
  logic [7:0]  out_sr;
  logic        rd_active;

  always_ff @(posedge sclk or posedge cs_n or negedge rst_n) begin
    if (!rst_n || cs_n) begin
      bitcnt    <= '0;
      shreg     <= '0;
      hdr       <= '0;
      hdr_valid <= 1'b0;
    end else begin
      shreg <= {shreg[13:0], mosi};
      if (bitcnt != 5'(FRAME_BITS)) bitcnt <= bitcnt + 5'd1;
      if (bitcnt == 5'(HDR_BITS - 1)) begin
        hdr       <= spi_hdr_t'({shreg[HDR_BITS-2:0], mosi});
        hdr_valid <= 1'b1;
      end
    end
  end

  assign wdata = {shreg[6:0], mosi};
  assign wr_en = !cs_n && hdr_valid && hdr.wr && (bitcnt == 5'(FRAME_BITS - 1));

  // read data out on falling edges
  always_ff @(negedge sclk or posedge cs_n or negedge rst_n) begin
    if (!rst_n || cs_n) begin
      out_sr    <= '0;
      rd_active <= 1'b0;
    end else if (bitcnt == 5'(HDR_BITS) && !hdr.wr) begin
      out_sr    <= rd_data;
      rd_active <= 1'b1;
    end else if (rd_active) begin
      out_sr    <= {out_sr[6:0], 1'b0};
    end
  end
  assign miso = rd_active && !cs_n && out_sr[7];
endmodule
