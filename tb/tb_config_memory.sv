// Self-checking testbench of the configuration memory: reset must clear
// every byte; random byte writes through one-hot selects are mirrored in a
// reference array and the full contents compared; writes with we low must
// change nothing; a second reset clears everything again.
module tb_config_memory;
  import panda_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [ROWS-1:0] row_sel = '0;
  logic [COLS-1:0] col_sel = '0;
  logic [7:0] wdata = '0;
  logic [7:0] cfg [ROWS][COLS];
  logic [7:0] ref_m [ROWS][COLS];
  int checks = 0, failures = 0;

  config_memory dut (.*);
  always #5 clk = ~clk;

  task automatic compare();
    int bad;
    bad = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) if (cfg[r][c] !== ref_m[r][c]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("%0d bytes differ", bad); end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) ref_m[r][c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 0; #1 rst_n = 1;
    compare();
    for (int n = 0; n < 3000; n++) begin
      int r, c;
      r = $urandom_range(ROWS - 1); c = $urandom_range(COLS - 1);
      @(negedge clk);
      row_sel = ROWS'(1) << r; col_sel = COLS'(1) << c; wdata = 8'($urandom);
      we = ($urandom_range(9) != 0);
      if (we) ref_m[r][c] = wdata;
      if (n % 500 == 0) begin @(posedge clk); #1 compare(); end
    end
    @(negedge clk); we = 0;
    @(posedge clk); #1 compare();
    rst_n = 0; #1 rst_n = 1;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) ref_m[r][c] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
