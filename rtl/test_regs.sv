// Test registers of the PANDA configuration interface.
//
// NUM_REGS byte registers that the host can both write and read back over
// SPI, to check the serial link before trusting configuration writes,
// which cannot be read back. Register i is selected by the low column
// address bits; rd_data shows the addressed register combinationally. The
// registers are also outputs, for observing them on the chip. Written on
// the rising SPI clock edge when we is high; cleared by reset.
//
// Read/write test registers follow the chip description; their number and
// addressing are this design's choices.
module test_regs #(
  parameter int unsigned NUM_REGS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        we,
  input  logic [$clog2(NUM_REGS)-1:0] waddr,
  input  logic [7:0]                  wdata,
  input  logic [$clog2(NUM_REGS)-1:0] raddr,
  output logic [7:0]                  rd_data,
  output logic [7:0]                  regs [NUM_REGS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end
  assign rd_data = regs[raddr];
endmodule
