// Self-checking testbench of the fully connected kernel with N_FC = 8:
// random 8-bit weights and 16-bit inputs, input lengths that are and are
// not multiples of N_FC, ReLU on and off, and a memory that stalls at
// random. Outputs are compared with the directly computed, rescaled and
// saturated sums; the number of MAC beats must be nout * ceil(nin / N_FC),
// i.e. N_FC MACs per beat.
module tb_fc_kernel;
  import cnn_pkg::*;
  localparam int NF = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, mac_fire;
  fc_args_t args;
  logic rd_valid, rd_ready, rd_rvalid, wr_valid, wr_ready;
  addr_t [2*NF-1:0] rd_addr;
  logic  [2*NF-1:0] rd_en;
  data_t [2*NF-1:0] rd_rdata;
  addr_t [0:0] wr_addr;
  logic  [0:0] wr_en;
  data_t [0:0] wr_data;

  fc_kernel #(.N_FC(NF)) dut (.*);
  mem_model #(.RL(2*NF), .WL(1), .DEPTH(16384), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .rd_valid, .rd_addr, .rd_en, .rd_ready, .rd_rvalid, .rd_rdata,
    .wr_valid, .wr_addr, .wr_en, .wr_data, .wr_ready);

  int checks = 0, failures = 0, macs = 0;
  always @(posedge clk) if (mac_fire) macs++;

  task automatic run(int nin, int nout, int sh, bit relu);
    args = '0;
    args.in_base = 32'h100; args.wt_base = 32'h1000; args.out_base = 32'h3800;
    args.nin = 16'(nin); args.nout = 16'(nout); args.shift = 6'(sh); args.relu = relu;
    for (int n = 0; n < nin; n++) u_mem.mem[32'h100 + n] = 16'($urandom);
    for (int n = 0; n < nin * nout; n++) u_mem.mem[32'h1000 + n] = 16'($signed(8'($urandom)));
    u_mem.mem[32'h3800 + nout] = 16'hABCD;
    macs = 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (done); @(posedge clk);
    for (int o = 0; o < nout; o++) begin
      longint s;
      s = 0;
      for (int n = 0; n < nin; n++)
        s += longint'($signed(u_mem.mem[32'h1000 + o * nin + n][7:0])) * longint'($signed(u_mem.mem[32'h100 + n]));
      s = s >>> sh;
      if (s > 32767) s = 32767;
      if (s < -32768) s = -32768;
      if (relu && s < 0) s = 0;
      checks++;
      if (u_mem.mem[32'h3800 + o] !== 16'(s)) begin
        failures++;
        if (failures < 10) $display("o=%0d got=%0d exp=%0d", o, $signed(u_mem.mem[32'h3800 + o]), s);
      end
    end
    checks++;
    if (u_mem.mem[32'h3800 + nout] !== 16'hABCD) failures++;
    checks++;
    if (macs != nout * ((nin + NF - 1) / NF)) begin
      failures++; $display("MAC beats %0d", macs);
    end
  endtask

  initial begin
    start = 0; args = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run(64, 10, 8, 1);
    run(37, 7, 4, 0);
    run(5, 3, 0, 0);     // shorter than one beat, saturating
    checks++;
    if (u_mem.rd_stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
