// Two-entry result buffer between a kernel's compute stage and its memory
// write port. The compute stage pushes a result in the cycle its read data
// returns; the write port pops when the memory accepts it. "space" tells the
// kernel how many results may still be issued, so a read is only launched
// when its result is sure to find room, and a write stall back-pressures
// the reads without losing data. Two entries let reads be issued every
// cycle while writes are accepted every cycle. This buffer is this design's
// own; the document leaves the load/store machinery to the compiler.
module res_fifo #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         nonempty,
  output logic [1:0]   count
);
  logic [W-1:0] mem [2];
  logic         rd_ptr, wr_ptr;

  assign dout     = mem[rd_ptr];
  assign nonempty = (count != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= 1'b0;
      wr_ptr <= 1'b0;
      count  <= '0;
      mem[0] <= '0;
      mem[1] <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= ~wr_ptr;
      end
      if (pop && nonempty) rd_ptr <= ~rd_ptr;
      count <= count + 2'(push) - 2'(pop && nonempty);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && count == 2 && !pop));
endmodule
