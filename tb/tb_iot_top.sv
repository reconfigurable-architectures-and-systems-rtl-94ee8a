// End-to-end testbench of the whole design at its default parameters.
//
// Acts as host and external memory. It runs a small network through the
// accelerator, one kernel launch per layer, each layer reading what the
// previous one wrote:
//   conv  8x12x12 input, 16 filters 3x3, pad 1, ReLU  -> 16x12x12
//         (N = 72 and P = 144: two k-steps and three P tiles of 64)
//   LRN   across 5 features                            -> 16x12x12
//   pool  3x3, stride 2, last windows overhang         -> 16x6x6
//   FC    576 inputs -> 10 outputs (576 is not a multiple of N_FC)
// Every layer's output is compared with a reference computed here from
// that layer's actual input (LRN within the PWL tolerance), and the
// convolution's MAC cycles must equal padded(M*N*P) / (N_CONV * S_CONV).
// The memory drops its ready lines at random. Meanwhile the PANDA
// configuration interface is programmed over SPI, a byte is rewritten
// (dynamic reconfiguration) and the test registers are read back.
// Each mechanism is counted and a failure is counted for any that never
// happened: read and write stalls, zero-padded loads, multi-step
// accumulation, ReLU clamping, a partial FC beat, overhanging pooling
// windows, configuration writes, rewrites, and test-register reads.
module tb_iot_top;
  import cnn_pkg::*;
  import panda_pkg::*;
  localparam int SC = 8, NN = 2, NP = 1, KM = 3, NF = 71, NC = 64;
  localparam int STALL = 15;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic conv_start = 0, lrn_start = 0, pool_start = 0, fc_start = 0;
  conv_args_t conv_args = '0;
  lrn_args_t lrn_args = '0;
  pool_args_t pool_args = '0;
  fc_args_t fc_args = '0;
  logic conv_busy, conv_done, conv_mac_fire, lrn_busy, lrn_done, pool_busy, pool_done;
  logic fc_busy, fc_done, fc_mac_fire;

  logic conv_rd_valid, conv_rd_ready, conv_rd_rvalid, conv_wr_valid, conv_wr_ready;
  addr_t [SC-1:0] conv_rd_addr, conv_wr_addr; logic [SC-1:0] conv_rd_en, conv_wr_en;
  data_t [SC-1:0] conv_rd_rdata, conv_wr_data;
  logic lrn_rd_valid, lrn_rd_ready, lrn_rd_rvalid, lrn_wr_valid, lrn_wr_ready;
  addr_t [3*NN-1:0] lrn_rd_addr; logic [3*NN-1:0] lrn_rd_en; data_t [3*NN-1:0] lrn_rd_rdata;
  addr_t [NN-1:0] lrn_wr_addr; logic [NN-1:0] lrn_wr_en; data_t [NN-1:0] lrn_wr_data;
  logic pool_rd_valid, pool_rd_ready, pool_rd_rvalid, pool_wr_valid, pool_wr_ready;
  addr_t [NP*KM*KM-1:0] pool_rd_addr; logic [NP*KM*KM-1:0] pool_rd_en; data_t [NP*KM*KM-1:0] pool_rd_rdata;
  addr_t [NP-1:0] pool_wr_addr; logic [NP-1:0] pool_wr_en; data_t [NP-1:0] pool_wr_data;
  logic fc_rd_valid, fc_rd_ready, fc_rd_rvalid, fc_wr_valid, fc_wr_ready;
  addr_t [2*NF-1:0] fc_rd_addr; logic [2*NF-1:0] fc_rd_en; data_t [2*NF-1:0] fc_rd_rdata;
  addr_t [0:0] fc_wr_addr; logic [0:0] fc_wr_en; data_t [0:0] fc_wr_data;

  logic panda_rst_n = 1, sclk = 0, cs_n = 1, mosi = 0, miso;
  logic [7:0] cfg [ROWS][COLS];
  logic [7:0] test_q [8];

  iot_top dut (.*);

  // ---------------- shared external memory ----------------
  logic [15:0] mem [65536];
  int rd_stalls = 0, wr_stalls = 0, pad_loads = 0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      conv_rd_ready <= 1; conv_wr_ready <= 1; lrn_rd_ready <= 1; lrn_wr_ready <= 1;
      pool_rd_ready <= 1; pool_wr_ready <= 1; fc_rd_ready <= 1; fc_wr_ready <= 1;
      conv_rd_rvalid <= 0; lrn_rd_rvalid <= 0; pool_rd_rvalid <= 0; fc_rd_rvalid <= 0;
    end else begin
      conv_rd_ready <= $urandom_range(99) >= STALL; conv_wr_ready <= $urandom_range(99) >= STALL;
      lrn_rd_ready  <= $urandom_range(99) >= STALL; lrn_wr_ready  <= $urandom_range(99) >= STALL;
      pool_rd_ready <= $urandom_range(99) >= STALL; pool_wr_ready <= $urandom_range(99) >= STALL;
      fc_rd_ready   <= $urandom_range(99) >= STALL; fc_wr_ready   <= $urandom_range(99) >= STALL;
      conv_rd_rvalid <= conv_rd_valid && conv_rd_ready;
      lrn_rd_rvalid  <= lrn_rd_valid && lrn_rd_ready;
      pool_rd_rvalid <= pool_rd_valid && pool_rd_ready;
      fc_rd_rvalid   <= fc_rd_valid && fc_rd_ready;
      if ((conv_rd_valid && !conv_rd_ready) || (lrn_rd_valid && !lrn_rd_ready) ||
          (pool_rd_valid && !pool_rd_ready) || (fc_rd_valid && !fc_rd_ready)) rd_stalls <= rd_stalls + 1;
      if ((conv_wr_valid && !conv_wr_ready) || (lrn_wr_valid && !lrn_wr_ready) ||
          (pool_wr_valid && !pool_wr_ready) || (fc_wr_valid && !fc_wr_ready)) wr_stalls <= wr_stalls + 1;
      if (conv_rd_valid && conv_rd_ready && conv_rd_en != '1) pad_loads <= pad_loads + 1;
      for (int l = 0; l < SC; l++) conv_rd_rdata[l] <= conv_rd_en[l] ? mem[conv_rd_addr[l][15:0]] : 16'hDEAD;
      for (int l = 0; l < 3*NN; l++) lrn_rd_rdata[l] <= lrn_rd_en[l] ? mem[lrn_rd_addr[l][15:0]] : 16'hDEAD;
      for (int l = 0; l < NP*KM*KM; l++) pool_rd_rdata[l] <= pool_rd_en[l] ? mem[pool_rd_addr[l][15:0]] : 16'hDEAD;
      for (int l = 0; l < 2*NF; l++) fc_rd_rdata[l] <= fc_rd_en[l] ? mem[fc_rd_addr[l][15:0]] : 16'hDEAD;
      if (conv_wr_valid && conv_wr_ready)
        for (int l = 0; l < SC; l++) if (conv_wr_en[l]) mem[conv_wr_addr[l][15:0]] <= conv_wr_data[l];
      if (lrn_wr_valid && lrn_wr_ready)
        for (int l = 0; l < NN; l++) if (lrn_wr_en[l]) mem[lrn_wr_addr[l][15:0]] <= lrn_wr_data[l];
      if (pool_wr_valid && pool_wr_ready)
        for (int l = 0; l < NP; l++) if (pool_wr_en[l]) mem[pool_wr_addr[l][15:0]] <= pool_wr_data[l];
      if (fc_wr_valid && fc_wr_ready && fc_wr_en[0]) mem[fc_wr_addr[0][15:0]] <= fc_wr_data[0];
    end
  end

  int checks = 0, failures = 0;
  int mac_cycles = 0, mac_phases = 0, relu_clamps = 0, partial_fc = 0, overhang = 0;
  int cfg_writes = 0, cfg_rewrites = 0, treg_reads = 0;
  logic mac_q = 0;
  always @(posedge clk) begin
    mac_q <= conv_mac_fire;
    if (conv_mac_fire) mac_cycles++;
    if (conv_mac_fire && !mac_q) mac_phases++;
  end

  localparam int IN = 16'h0100, WC = 16'h1000, C1 = 16'h3000, L1 = 16'h4000, P1 = 16'h5000;
  localparam int WF = 16'h6000, FO = 16'hA000;
  localparam int NIF = 8, H = 12, W = 12, NOF = 16, K = 3, HW = H * W;
  localparam int PH = 6, PW = 6, NIN = NOF * PH * PW, NOUT = 10;

  function automatic int sx(logic [15:0] v); return int'($signed(v)); endfunction
  function automatic int sat16(longint s);
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction
  function automatic int pad_up(int v); return ((v + NC - 1) / NC) * NC; endfunction

  // ---------------- SPI host ----------------
  task automatic spi_frame(bit wr, bit space, int row, int col, logic [7:0] d, output logic [7:0] rx);
    logic [23:0] bits;
    bits = {wr, space, 8'(row), 6'(col), d};
    rx = '0;
    cs_n = 0; #40;
    for (int i = 23; i >= 0; i--) begin
      mosi = bits[i]; #20;
      sclk = 1; if (i < 8) rx = {rx[6:0], miso}; #20;
      sclk = 0;
    end
    #20; cs_n = 1; #40;
  endtask

  logic [7:0] cfg_ref [ROWS][COLS];

  task automatic panda_session();
    logic [7:0] rx;
    int bad;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) cfg_ref[r][c] = '0;
    #2 panda_rst_n = 0; #30 panda_rst_n = 1; #30;
    // a configuration pattern: a few cells' widths and switch bytes
    for (int n = 0; n < 150; n++) begin
      int r, c; logic [7:0] d;
      r = $urandom_range(ROWS - 1); c = $urandom_range(COLS - 1); d = 8'($urandom);
      spi_frame(1, 0, r, c, d, rx);
      cfg_ref[r][c] = d; cfg_writes++;
    end
    // trim: rewrite one byte of the configuration
    spi_frame(1, 0, 17, 3, 8'hA5, rx); cfg_ref[17][3] = 8'hA5; cfg_writes++;
    spi_frame(1, 0, 17, 3, 8'h5A, rx); cfg_ref[17][3] = 8'h5A; cfg_writes++; cfg_rewrites++;
    for (int t = 0; t < 8; t++) spi_frame(1, 1, 0, t, 8'(t * 29 + 7), rx);
    for (int t = 0; t < 8; t++) begin
      spi_frame(0, 1, 0, t, 8'h00, rx);
      treg_reads++;
      checks++;
      if (rx !== 8'(t * 29 + 7)) failures++;
    end
    bad = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) if (cfg[r][c] !== cfg_ref[r][c]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("%0d configuration bytes differ", bad); end
  endtask

  // ---------------- network ----------------
  task automatic network();
    for (int i = 0; i < 65536; i++) mem[i] = '0;
    for (int i = 0; i < NIF * HW; i++) mem[IN + i] = 16'($urandom_range(1200) - 600);
    for (int i = 0; i < NOF * NIF * K * K; i++) mem[WC + i] = 16'($signed(8'($urandom)));
    for (int i = 0; i < NOUT * NIN; i++) mem[WF + i] = 16'($signed(8'($urandom)));

    // conv
    conv_args.in_base = IN; conv_args.wt_base = WC; conv_args.out_base = C1;
    conv_args.nif = NIF; conv_args.in_h = H; conv_args.in_w = W; conv_args.nof = NOF;
    conv_args.out_h = H; conv_args.out_w = W; conv_args.k = K; conv_args.stride = 1;
    conv_args.pad = 1; conv_args.shift = 7; conv_args.relu = 1;
    @(posedge clk); conv_start <= 1; @(posedge clk); conv_start <= 0;
    wait (conv_done); @(posedge clk);
    for (int fo = 0; fo < NOF; fo++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          longint s; int e;
          s = 0;
          for (int fi = 0; fi < NIF; fi++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                if (y + ky - 1 >= 0 && y + ky - 1 < H && x + kx - 1 >= 0 && x + kx - 1 < W)
                  s += longint'(sx(mem[WC + ((fo * NIF + fi) * K + ky) * K + kx][7:0] | {8{mem[WC + ((fo * NIF + fi) * K + ky) * K + kx][7]}} << 8)) *
                       longint'(sx(mem[IN + (fi * H + y + ky - 1) * W + x + kx - 1]));
          e = sat16(s >>> 7);
          if (e < 0) begin e = 0; relu_clamps++; end
          checks++;
          if (sx(mem[C1 + fo * HW + y * W + x]) != e) begin
            failures++;
            if (failures < 10) $display("conv fo=%0d y=%0d x=%0d got=%0d exp=%0d", fo, y, x, sx(mem[C1 + fo * HW + y * W + x]), e);
          end
        end
    checks++;
    if (mac_cycles != pad_up(NOF) * pad_up(NIF * K * K) * pad_up(HW) / (NC * SC)) begin
      failures++; $display("conv MAC cycles %0d", mac_cycles);
    end

    // LRN
    lrn_args.in_base = C1; lrn_args.out_base = L1; lrn_args.nfeat = NOF; lrn_args.hw = HW;
    lrn_args.k = 5; lrn_args.alpha_k = 32'd429496730;   // 0.1
    @(posedge clk); lrn_start <= 1; @(posedge clk); lrn_start <= 0;
    wait (lrn_done); @(posedge clk);
    for (int f = 0; f < NOF; f++)
      for (int j = 0; j < HW; j++) begin
        real s, x0, e, g, v;
        s = 0.0;
        for (int q = f - 2; q <= f + 2; q++)
          if (q >= 0 && q < NOF) begin v = real'(sx(mem[C1 + q * HW + j])) / 256.0; s += v * v; end
        x0 = 0.1 * s;
        if (x0 > 79.6) x0 = 79.6;
        e = real'(sx(mem[C1 + f * HW + j])) * $pow(1.0 + x0, -0.75);
        g = real'(sx(mem[L1 + f * HW + j]));
        checks++;
        if (g - e > e * 0.012 + 2.0 || e - g > e * 0.012 + 2.0) begin
          failures++;
          if (failures < 10) $display("lrn f=%0d j=%0d got=%f exp=%f", f, j, g, e);
        end
      end

    // pool
    pool_args.in_base = L1; pool_args.out_base = P1; pool_args.nfeat = NOF;
    pool_args.in_h = H; pool_args.in_w = W; pool_args.out_h = PH; pool_args.out_w = PW;
    pool_args.k = 3; pool_args.stride = 2;
    @(posedge clk); pool_start <= 1; @(posedge clk); pool_start <= 0;
    wait (pool_done); @(posedge clk);
    for (int f = 0; f < NOF; f++)
      for (int y = 0; y < PH; y++)
        for (int x = 0; x < PW; x++) begin
          int m; bit ov;
          m = -32768; ov = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              if (2 * y + ky < H && 2 * x + kx < W) begin
                if (sx(mem[L1 + (f * H + 2 * y + ky) * W + 2 * x + kx]) > m)
                  m = sx(mem[L1 + (f * H + 2 * y + ky) * W + 2 * x + kx]);
              end else ov = 1;
          if (ov) overhang++;
          checks++;
          if (sx(mem[P1 + (f * PH + y) * PW + x]) != m) failures++;
        end

    // FC
    fc_args.in_base = P1; fc_args.wt_base = WF; fc_args.out_base = FO;
    fc_args.nin = NIN; fc_args.nout = NOUT; fc_args.shift = 6; fc_args.relu = 0;
    @(posedge clk); fc_start <= 1; @(posedge clk); fc_start <= 0;
    wait (fc_done); @(posedge clk);
    if (NIN % NF != 0) partial_fc++;
    for (int o = 0; o < NOUT; o++) begin
      longint s;
      s = 0;
      for (int n = 0; n < NIN; n++)
        s += longint'($signed(mem[WF + o * NIN + n][7:0])) * longint'(sx(mem[P1 + n]));
      checks++;
      if (sx(mem[FO + o]) != sat16(s >>> 6)) begin
        failures++; $display("fc o=%0d got=%0d exp=%0d", o, sx(mem[FO + o]), sat16(s >>> 6));
      end
    end
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-22s %0d", name, n);
    if (n == 0) begin failures++; $display("mechanism %s never happened", name); end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    fork
      network();
      panda_session();
    join
    mech("read stall", rd_stalls);
    mech("write stall", wr_stalls);
    mech("zero-padded load", pad_loads);
    mech("multi-step accumulate", mac_phases > pad_up(NOF) / NC * pad_up(HW) / NC ? 1 : 0);
    mech("ReLU clamp", relu_clamps);
    mech("partial FC beat", partial_fc);
    mech("overhanging pool window", overhang);
    mech("config write", cfg_writes);
    mech("config rewrite", cfg_rewrites);
    mech("test register read", treg_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired conv=%0d lrn=%0d pool=%0d fc=%0d macs=%0d", conv_busy, lrn_busy, pool_busy, fc_busy, mac_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
