// Self-checking testbench of the convolution kernel. Runs small layers with
// random data through a reduced tile (N_CONV = 8, S_CONV = 4) against a
// memory that stalls at random, compares every output word with a direct
// evaluation of the convolution sum, checks that the border and the
// matrix padding read as zero, and checks the MAC-phase cycle count:
// padded(M) * padded(N) * padded(P) / (N_CONV * S_CONV).
module tb_conv_kernel;
  import cnn_pkg::*;
  localparam int NC = 8, SC = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, mac_fire;
  conv_args_t args;
  logic rd_valid, rd_ready, rd_rvalid, wr_valid, wr_ready;
  addr_t [SC-1:0] rd_addr, wr_addr;
  logic [SC-1:0] rd_en, wr_en;
  data_t [SC-1:0] rd_rdata, wr_data;

  conv_kernel #(.N_CONV(NC), .S_CONV(SC)) dut (.*);
  mem_model #(.RL(SC), .WL(SC), .DEPTH(65536), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .rd_valid, .rd_addr, .rd_en, .rd_ready, .rd_rvalid, .rd_rdata,
    .wr_valid, .wr_addr, .wr_en, .wr_data, .wr_ready);

  int checks = 0, failures = 0;
  int mac_cycles = 0;
  always @(posedge clk) if (mac_fire) mac_cycles++;

  function automatic int pad_up(int v); return ((v + NC - 1) / NC) * NC; endfunction

  task automatic run_layer(int nif, int h, int w, int nof, int k, int st, int pd, int sh, bit relu);
    int oh, ow, n, p, exp_cycles;
    oh = (h + 2 * pd - k) / st + 1;
    ow = (w + 2 * pd - k) / st + 1;
    args = '0;
    args.in_base = 32'h100; args.wt_base = 32'h4000; args.out_base = 32'h8000;
    args.nif = 16'(nif); args.in_h = 16'(h); args.in_w = 16'(w); args.nof = 16'(nof);
    args.out_h = 16'(oh); args.out_w = 16'(ow); args.k = 4'(k); args.stride = 4'(st);
    args.pad = 4'(pd); args.shift = 6'(sh); args.relu = relu;
    for (int i = 0; i < nif * h * w; i++) u_mem.mem[32'h100 + i] = 16'($urandom_range(600) - 300);
    for (int i = 0; i < nof * nif * k * k; i++) u_mem.mem[32'h4000 + i] = 16'($signed(8'($urandom)));
    for (int i = 0; i < 4096; i++) u_mem.mem[32'h8000 + i] = 16'h5555;
    mac_cycles = 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (done); @(posedge clk);
    // reference
    for (int fo = 0; fo < nof; fo++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          longint s; int r; logic [15:0] got;
          s = 0;
          for (int fi = 0; fi < nif; fi++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy, ix;
                iy = oy * st + ky - pd; ix = ox * st + kx - pd;
                if (iy >= 0 && iy < h && ix >= 0 && ix < w)
                  s += longint'($signed(u_mem.mem[32'h4000 + ((fo * nif + fi) * k + ky) * k + kx][7:0])) *
                       longint'($signed(u_mem.mem[32'h100 + (fi * h + iy) * w + ix]));
              end
          s = s >>> sh;
          if (s > 32767) s = 32767;
          if (s < -32768) s = -32768;
          if (relu && s < 0) s = 0;
          r = int'(s);
          got = u_mem.mem[32'h8000 + fo * oh * ow + oy * ow + ox];
          checks++;
          if (got !== 16'(r)) begin
            failures++;
            if (failures < 10) $display("MISMATCH fo=%0d oy=%0d ox=%0d got=%0d exp=%0d", fo, oy, ox, $signed(got), r);
          end
        end
    // nothing written beyond the output
    checks++;
    if (u_mem.mem[32'h8000 + nof * oh * ow] !== 16'h5555) failures++;
    n = nif * k * k; p = oh * ow;
    exp_cycles = pad_up(nof) * pad_up(n) * pad_up(p) / (NC * SC);
    checks++;
    if (mac_cycles != exp_cycles) begin
      failures++;
      $display("MAC cycles %0d, expected %0d", mac_cycles, exp_cycles);
    end
  endtask

  initial begin
    start = 0; args = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_layer(3, 9, 9, 10, 3, 2, 1, 4, 1);   // padding, stride, several tiles in M, N, P
    run_layer(5, 6, 7, 6, 1, 1, 0, 2, 0);    // 1x1 filter, no ReLU
    run_layer(2, 11, 11, 9, 5, 3, 2, 6, 1);  // larger filter
    $display("cycles=%0t stalls=%0d beats=%0d", $time, u_mem.rd_stalls, u_mem.rd_beats);
    checks++;
    if (u_mem.rd_stalls == 0) begin failures++; $display("no read stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
