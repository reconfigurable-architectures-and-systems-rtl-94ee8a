// Self-checking testbench of the test registers: random writes mirrored in
// a reference, every register read back through rd_data and the regs
// outputs, and reset clearing them.
module tb_test_regs;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rd_data;
  logic [7:0] regs [8];
  logic [7:0] ref_r [8];
  int checks = 0, failures = 0;

  test_regs #(.NUM_REGS(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 8; i++) ref_r[i] = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = 8'($urandom); raddr = 3'($urandom);
      @(posedge clk); #1;
      if (we) ref_r[waddr] = wdata;
      checks++;
      if (rd_data !== ref_r[raddr] || regs[raddr] !== ref_r[raddr]) failures++;
    end
    rst_n = 0; #1;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (regs[i] !== 0) failures++;
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
