// Self-checking testbench of the row/column decoders: every row and column
// address with enable high must give exactly the matching one-hot lines,
// and enable low must give none.
module tb_addr_decoder;
  import panda_pkg::*;
  logic en;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0] col_sel;
  int checks = 0, failures = 0;

  addr_decoder dut (.*);

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      en = 1; row = ROW_W'(r); col = COL_W'(r % COLS); #1;
      checks++;
      if (row_sel != (ROWS'(1) << r) || col_sel != (COLS'(1) << (r % COLS))) failures++;
      en = 0; #1;
      checks++;
      if (row_sel != 0 || col_sel != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
