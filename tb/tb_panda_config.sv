// Self-checking testbench of the PANDA configuration interface, driven
// through SPI frames only. Writes a random configuration pattern (a few
// hundred bytes at random row/column addresses, some rewritten later, as
// in dynamic reconfiguration), writes and reads back every test register,
// checks that a read of the configuration memory returns zero and writes
// nothing, compares the full 16 KB contents with a reference, and checks
// that reset clears them.
module tb_panda_config;
  import panda_pkg::*;
  logic rst_n = 1, sclk = 0, cs_n = 1, mosi = 0, miso;
  logic [7:0] cfg [ROWS][COLS];
  logic [7:0] test_q [8];
  logic [7:0] ref_m [ROWS][COLS];
  int checks = 0, failures = 0;

  panda_config dut (.*);

  task automatic frame(bit wr, bit space, int row, int col, logic [7:0] d, output logic [7:0] rx);
    logic [23:0] bits;
    bits = {wr, space, 8'(row), 6'(col), d};
    rx = '0;
    cs_n = 0; #20;
    for (int i = 23; i >= 0; i--) begin
      mosi = bits[i]; #10;
      sclk = 1; if (i < 8) rx = {rx[6:0], miso}; #10;
      sclk = 0;
    end
    #10; cs_n = 1; #20;
  endtask

  task automatic compare();
    int bad;
    bad = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) if (cfg[r][c] !== ref_m[r][c]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("%0d configuration bytes differ", bad); end
  endtask

  initial begin
    logic [7:0] rx;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) ref_m[r][c] = '0;
    #2 rst_n = 0; #13 rst_n = 1; #10;
    compare();
    for (int n = 0; n < 400; n++) begin
      int r, c;
      logic [7:0] d;
      r = $urandom_range(ROWS - 1); c = $urandom_range(COLS - 1); d = 8'($urandom);
      frame(1, 0, r, c, d, rx);
      ref_m[r][c] = d;
    end
    compare();
    for (int t = 0; t < 8; t++) frame(1, 1, 0, t, 8'(8'h3C ^ (t * 37)), rx);
    for (int t = 0; t < 8; t++) begin
      frame(0, 1, 0, t, 8'h00, rx);
      checks++;
      if (rx !== 8'(8'h3C ^ (t * 37)) || test_q[t] !== rx) failures++;
    end
    frame(0, 0, 5, 5, 8'hFF, rx);
    checks++;
    if (rx !== 8'h00) failures++;
    compare();
    rst_n = 0; #5 rst_n = 1; #5;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) ref_m[r][c] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
