// Self-checking testbench of the SPI slave: random write and read frames in
// mode 0. For writes it checks that exactly one write strobe occurs, at the
// 24th rising edge, with the sent header and byte; for reads it checks that
// the byte offered on rd_data comes out on MISO MSB first; an aborted
// (short) frame must write nothing.
module tb_spi_slave;
  import panda_pkg::*;
  logic rst_n = 1, sclk = 0, cs_n = 1, mosi = 0, miso, wr_en, hdr_valid;
  spi_hdr_t hdr;
  logic [7:0] wdata, rd_data;
  int checks = 0, failures = 0, strobes = 0;
  spi_hdr_t s_hdr;
  logic [7:0] s_data;

  spi_slave dut (.*);

  // register model answering reads: depends on the address
  assign rd_data = {hdr.col, 2'b10} ^ hdr.row;

  always @(posedge sclk) if (wr_en) begin
    strobes++; s_hdr = hdr; s_data = wdata;
  end

  task automatic frame(logic [23:0] bits, int nbits, output logic [7:0] rx);
    rx = '0;
    cs_n = 0; #20;
    for (int i = 23; i > 23 - nbits; i--) begin
      mosi = bits[i]; #10;
      sclk = 1; if (i < 8) rx = {rx[6:0], miso}; #10;
      sclk = 0;
    end
    #10; cs_n = 1; #20;
  endtask

  initial begin
    logic [7:0] rx;
    #2 rst_n = 0; #13 rst_n = 1; #10;
    for (int n = 0; n < 200; n++) begin
      logic [23:0] f;
      int s0;
      f = 24'($urandom);
      s0 = strobes;
      frame(f, 24, rx);
      checks++;
      if (f[23]) begin
        if (strobes != s0 + 1 || s_hdr != spi_hdr_t'(f[23:8]) || s_data != f[7:0]) failures++;
      end else begin
        if (strobes != s0 || rx != ({f[13:8], 2'b10} ^ f[21:14])) begin
          failures++;
          if (failures < 10) $display("read %h got %h", f, rx);
        end
      end
    end
    begin
      int s0;
      s0 = strobes;
      frame(24'hFFFFFF, 20, rx);
      checks++;
      if (strobes != s0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
