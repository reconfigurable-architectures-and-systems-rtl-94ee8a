// Self-checking testbench of the max-pooling kernel: random feature maps,
// 3x3 windows with stride 2 (windows overhanging the right and bottom edges
// included) and 2x2 stride 2, with N_POOL = 2 outputs per beat to cover a
// partial last group, against a memory that stalls at random. Every output
// is compared with the maximum computed directly; the number of read beats
// must be features * out_h * ceil(out_w / N_POOL).
module tb_pool_kernel;
  import cnn_pkg::*;
  localparam int NP = 2, KM = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  pool_args_t args;
  logic rd_valid, rd_ready, rd_rvalid, wr_valid, wr_ready;
  addr_t [NP*KM*KM-1:0] rd_addr;
  logic  [NP*KM*KM-1:0] rd_en;
  data_t [NP*KM*KM-1:0] rd_rdata;
  addr_t [NP-1:0] wr_addr;
  logic  [NP-1:0] wr_en;
  data_t [NP-1:0] wr_data;

  pool_kernel #(.N_POOL(NP), .KMAX(KM)) dut (.*);
  mem_model #(.RL(NP*KM*KM), .WL(NP), .DEPTH(16384), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .rd_valid, .rd_addr, .rd_en, .rd_ready, .rd_rvalid, .rd_rdata,
    .wr_valid, .wr_addr, .wr_en, .wr_data, .wr_ready);

  int checks = 0, failures = 0;

  task automatic run(int nf, int h, int w, int k, int st);
    int oh, ow, b0;
    oh = (h - k + st - 1) / st + 1;   // ceil mode: last window may overhang
    ow = (w - k + st - 1) / st + 1;
    args = '0;
    args.in_base = 32'h100; args.out_base = 32'h3000; args.nfeat = 16'(nf);
    args.in_h = 16'(h); args.in_w = 16'(w); args.out_h = 16'(oh); args.out_w = 16'(ow);
    args.k = 4'(k); args.stride = 4'(st);
    for (int n = 0; n < nf * h * w; n++) u_mem.mem[32'h100 + n] = 16'($urandom);
    for (int n = 0; n < nf * oh * ow + 4; n++) u_mem.mem[32'h3000 + n] = 16'h1234;
    b0 = u_mem.rd_beats;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (done); @(posedge clk);
    for (int f = 0; f < nf; f++)
      for (int y = 0; y < oh; y++)
        for (int x = 0; x < ow; x++) begin
          int m;
          m = -32768;
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++)
              if (y * st + ky < h && x * st + kx < w)
                if (int'($signed(u_mem.mem[32'h100 + (f * h + y * st + ky) * w + x * st + kx])) > m)
                  m = int'($signed(u_mem.mem[32'h100 + (f * h + y * st + ky) * w + x * st + kx]));
          checks++;
          if (int'($signed(u_mem.mem[32'h3000 + (f * oh + y) * ow + x])) != m) begin
            failures++;
            if (failures < 10) $display("f=%0d y=%0d x=%0d got=%0d exp=%0d", f, y, x,
                                        $signed(u_mem.mem[32'h3000 + (f * oh + y) * ow + x]), m);
          end
        end
    checks++;
    if (u_mem.mem[32'h3000 + nf * oh * ow] !== 16'h1234) failures++;
    checks++;
    if (u_mem.rd_beats - b0 != nf * oh * ((ow + NP - 1) / NP)) failures++;
  endtask

  initial begin
    start = 0; args = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run(3, 8, 8, 3, 2);    // 4x4 outputs, last windows overhang
    run(2, 9, 11, 3, 2);   // 4x5 outputs, odd row length
    run(2, 6, 6, 2, 2);    // 2x2 windows
    checks++;
    if (u_mem.rd_stalls == 0 || u_mem.wr_stalls == 0) failures++;
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
