// Self-checking testbench of the LRN kernel: random Q8.8 feature maps,
// normalised across K = 5 (and K = 3) neighbouring features with a memory
// that stalls at random. Each output is compared with
// in * (1 + alpha/K * sum in^2)^-0.75 evaluated in real arithmetic over the
// exact window (edges included); the tolerance covers the 1 % of the
// piecewise-linear approximation. Also checks that the kernel writes each
// nothing beyond the output, and that the kernel reads in beats of N_NORM
// neurons: (max(K/2,1) + features) * ceil(hw / N_NORM) read beats.
module tb_lrn_kernel;
  import cnn_pkg::*;
  localparam int NN = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  lrn_args_t args;
  logic rd_valid, rd_ready, rd_rvalid, wr_valid, wr_ready;
  addr_t [3*NN-1:0] rd_addr;
  logic  [3*NN-1:0] rd_en;
  data_t [3*NN-1:0] rd_rdata;
  addr_t [NN-1:0] wr_addr;
  logic  [NN-1:0] wr_en;
  data_t [NN-1:0] wr_data;

  lrn_kernel #(.N_NORM(NN), .MAX_HW(64)) dut (.*);
  mem_model #(.RL(3*NN), .WL(NN), .DEPTH(16384), .STALL_PCT(15)) u_mem (
    .clk, .rst_n, .rd_valid, .rd_addr, .rd_en, .rd_ready, .rd_rvalid, .rd_rdata,
    .wr_valid, .wr_addr, .wr_en, .wr_data, .wr_ready);

  int checks = 0, failures = 0, cycles = 0;

  task automatic run(int nf, int hw, int k, real alpha_k);
    int b0, eb;
    b0 = u_mem.rd_beats;
    args = '0;
    args.in_base = 32'h100; args.out_base = 32'h2000; args.nfeat = 16'(nf);
    args.hw = 16'(hw); args.k = 4'(k);
    args.alpha_k = 32'($rtoi(alpha_k * 4294967296.0));
    for (int n = 0; n < nf * hw; n++) u_mem.mem[32'h100 + n] = 16'($urandom_range(4000) - 2000);
    for (int n = 0; n < nf * hw + 8; n++) u_mem.mem[32'h2000 + n] = 16'h7777;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cycles = 0;
    while (!done) begin @(posedge clk); cycles++; end
    @(posedge clk);
    for (int f = 0; f < nf; f++)
      for (int jj = 0; jj < hw; jj++) begin
        real s, x0, e, tol, g, v;
        s = 0.0;
        for (int q = f - k / 2; q <= f + k / 2; q++)
          if (q >= 0 && q < nf) begin
            v = real'($signed(u_mem.mem[32'h100 + q * hw + jj])) / 256.0;
            s += v * v;
          end
        x0 = real'(args.alpha_k) / 4294967296.0 * s;
        if (x0 > 79.6) x0 = 79.6;
        e = real'($signed(u_mem.mem[32'h100 + f * hw + jj])) * $pow(1.0 + x0, -0.75);
        tol = (e < 0 ? -e : e) * 0.012 + 2.0;
        g = real'($signed(u_mem.mem[32'h2000 + f * hw + jj]));
        checks++;
        if (g - e > tol || e - g > tol) begin
          failures++;
          if (failures < 10) $display("f=%0d j=%0d got=%f exp=%f", f, jj, g, e);
        end
      end
    checks++;
    if (u_mem.mem[32'h2000 + nf * hw] !== 16'h7777) failures++;
    eb = ((k / 2 > 0 ? k / 2 : 1) + nf) * ((hw + NN - 1) / NN);
    checks++;
    if (u_mem.rd_beats - b0 != eb) begin
      failures++;
      $display("read beats %0d, expected %0d", u_mem.rd_beats - b0, eb);
    end
  endtask

  initial begin
    start = 0; args = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run(9, 20, 5, 0.05);
    run(6, 7, 3, 0.2);
    run(4, 5, 1, 0.1);
    checks++;
    if (u_mem.rd_stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
