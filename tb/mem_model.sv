// Behavioural model of the accelerator's external memory, for testbenches.
// One gather read port (RL lanes) and one scatter write port (WL lanes) on
// an array of 16-bit words. A request is accepted when valid && ready; read
// data return exactly one cycle after acceptance. When STALL_PCT > 0 the
// ready lines drop at random, which exercises the kernels' stall handling.
// Disabled read lanes return a junk value so that a kernel which does not
// mask them is caught. Counts stalled request cycles.
module mem_model #(
  parameter int unsigned RL        = 1,
  parameter int unsigned WL        = 1,
  parameter int unsigned DEPTH     = 65536,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rd_valid,
  input  logic [RL-1:0][31:0]  rd_addr,
  input  logic [RL-1:0]        rd_en,
  output logic                 rd_ready,
  output logic                 rd_rvalid,
  output logic [RL-1:0][15:0]  rd_rdata,
  input  logic                 wr_valid,
  input  logic [WL-1:0][31:0]  wr_addr,
  input  logic [WL-1:0]        wr_en,
  input  logic [WL-1:0][15:0]  wr_data,
  output logic                 wr_ready
);
  logic [15:0] mem [DEPTH];
  int unsigned rd_stalls = 0, wr_stalls = 0, rd_beats = 0, wr_beats = 0;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ready  <= 1'b1;
      wr_ready  <= 1'b1;
      rd_rvalid <= 1'b0;
    end else begin
      rd_ready  <= ($urandom_range(99) >= STALL_PCT);
      wr_ready  <= ($urandom_range(99) >= STALL_PCT);
      rd_rvalid <= rd_valid && rd_ready;
      if (rd_valid && !rd_ready) rd_stalls <= rd_stalls + 1;
      if (wr_valid && !wr_ready) wr_stalls <= wr_stalls + 1;
      if (rd_valid && rd_ready) begin
        rd_beats <= rd_beats + 1;
        for (int l = 0; l < RL; l++)
          rd_rdata[l] <= rd_en[l] ? mem[rd_addr[l] % DEPTH] : 16'hDEAD;
      end
      if (wr_valid && wr_ready) begin
        wr_beats <= wr_beats + 1;
        for (int l = 0; l < WL; l++)
          if (wr_en[l]) mem[wr_addr[l] % DEPTH] <= wr_data[l];
      end
    end
  end
endmodule
