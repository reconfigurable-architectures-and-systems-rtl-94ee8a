// Local response normalisation kernel (normalisation across features).
//
//   out(i, j) = in(i, j) * f1(x0),  f1(x0) = (1 + x0)^(-beta),
//   x0 = alpha/K * sum of in(f, j)^2 over features f = i-K/2 .. i+K/2.
//
// The kernel keeps a running sum of squares per neuron j in local memory
// (sos), so each input is squared only twice: once when it enters the
// window of K features and once when it leaves it. First the squares of the
// first K/2 features are summed (pre-pass). Then for every feature i and
// every group of N_NORM neurons it reads three words per neuron:
// in(i+K/2, j) which enters the window, in(i, j) which is normalised, and
// in(i-K/2, j) which leaves it. When the data return, the entering square is
// added, x0 and f1 (through the piecewise-linear unit) are formed, the
// output is written, and the leaving square is subtracted, all for N_NORM
// neurons per cycle.
//
// Memory ports as in the other kernels (accepted when valid && ready, read
// data one cycle later). Results pass through a two-entry buffer, so reads
// go out every cycle unless the write port stalls. start is sampled in
// idle; done pulses for one cycle.
//
// The sliding-window algorithm, the 20-point PWL approximation and
// N_NORM = 2 follow the accelerator description. The description computes
// this layer in 32-bit floating point; this design uses fixed point
// instead: Q8.8 data, a 36-bit sum of squares (Q16.16), alpha/K as an
// unsigned 0.32 fraction, x0 saturated to Q16.16 and f1 in Q1.15.
// MAX_HW (neurons per feature held in the sos memory) is this design's
// choice, sized for a 55 x 55 feature map.
module lrn_kernel
  import cnn_pkg::*;
#(
  parameter int unsigned N_NORM = 2,
  parameter int unsigned MAX_HW = 3025
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  lrn_args_t                  args,
  output logic                       busy,
  output logic                       done,
  output logic                       rd_valid,
  output addr_t [3*N_NORM-1:0]       rd_addr,
  output logic  [3*N_NORM-1:0]       rd_en,
  input  logic                       rd_ready,
  input  logic                       rd_rvalid,
  input  data_t [3*N_NORM-1:0]       rd_rdata,
  output logic                       wr_valid,
  output addr_t [N_NORM-1:0]         wr_addr,
  output logic  [N_NORM-1:0]         wr_en,
  output data_t [N_NORM-1:0]         wr_data,
  input  logic                       wr_ready
);
  localparam int unsigned SOS_W = 36;
  typedef logic [SOS_W-1:0] sos_t;

  typedef struct packed {
    addr_t                    waddr;
    logic [N_NORM-1:0]        wen;
    logic [N_NORM*DATA_W-1:0] wdata;
  } res_t;

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_PRE, S_MAIN} state_t;
  state_t state;

  lrn_args_t   a;
  logic [3:0]  h;           // K/2
  logic [31:0] h_off;       // (K/2) * hw
  logic [15:0] npre;        // passes of the pre-pass
  logic [15:0] i;           // feature (t in the pre-pass)
  logic [31:0] j;           // first neuron of the group
  logic [31:0] c_off;       // i * hw
  logic        issue_left;

  sos_t sos [MAX_HW];

  // landing stage
  logic                  land_valid, land_pre, land_first;
  logic [31:0]           land_j;
  logic [3*N_NORM-1:0]   land_en;
  addr_t                 land_waddr;

  // result buffer
  res_t       fin, fout;
  logic       f_push, f_pop, f_nonempty;
  logic [1:0] f_count;

  res_fifo #(.W($bits(res_t))) u_fifo (
    .clk, .rst_n, .push(f_push), .din(fin), .pop(f_pop), .dout(fout),
    .nonempty(f_nonempty), .count(f_count));

  assign f_pop    = wr_valid && wr_ready;
  assign wr_valid = f_nonempty;
  for (genvar l = 0; l < N_NORM; l++) begin : g_wr
    assign wr_addr[l] = fout.waddr + 32'(l);
    assign wr_en[l]   = fout.wen[l];
    assign wr_data[l] = fout.wdata[l*DATA_W +: DATA_W];
  end

  // ---------------- issue ----------------
  logic room;
  assign room = (3'(f_count) - 3'(f_pop) + 3'(land_valid)) < 3'd2;

  always_comb begin
    rd_valid = issue_left && ((state == S_PRE) || (state == S_MAIN && room));
    for (int l = 0; l < N_NORM; l++) begin
      logic jok;
      jok = (j + 32'(l) < 32'(a.hw));
      if (state == S_PRE) begin
        rd_addr[l] = a.in_base + c_off + j + 32'(l);
        rd_en[l]   = jok && (i < 16'(h)) && (i < a.nfeat);
      end else begin
        rd_addr[l] = a.in_base + c_off + h_off + j + 32'(l);
        rd_en[l]   = jok && (32'(i) + 32'(h) < 32'(a.nfeat));
      end
      rd_addr[N_NORM + l]   = a.in_base + c_off + j + 32'(l);
      rd_en[N_NORM + l]     = jok && (state == S_MAIN);
      rd_addr[2*N_NORM + l] = a.in_base + c_off - h_off + j + 32'(l);
      rd_en[2*N_NORM + l]   = jok && (state == S_MAIN) && (i >= 16'(h));
    end
  end

  // ---------------- compute on returning data ----------------
  sos_t        s_add  [N_NORM];
  sos_t        s_next [N_NORM];
  logic [31:0] x0     [N_NORM];
  logic [15:0] f1     [N_NORM];
  data_t       outv   [N_NORM];

  for (genvar l = 0; l < N_NORM; l++) begin : g_lane
    pwl_unit u_pwl (.x(x0[l]), .y(f1[l]));
  end

  always_comb begin
    fin = '0;
    fin.waddr = land_waddr;
    for (int l = 0; l < N_NORM; l++) begin
      data_t va, vc, vs;
      sos_t  old, sq_a, sq_s;
      logic [SOS_W+31:0] xp;
      logic signed [DATA_W+16:0] pr;
      int unsigned idx;
      idx  = (land_j + 32'(l)) % MAX_HW;
      va   = land_en[l]            ? rd_rdata[l]            : '0;
      vc   = land_en[N_NORM + l]   ? rd_rdata[N_NORM + l]   : '0;
      vs   = land_en[2*N_NORM + l] ? rd_rdata[2*N_NORM + l] : '0;
      sq_a = sos_t'(32'(va * va));
      sq_s = sos_t'(32'(vs * vs));
      old  = (land_pre && land_first) ? '0 : sos[idx];
      s_add[l]  = old + sq_a;
      s_next[l] = s_add[l] - sq_s;
      xp    = (SOS_W+32)'(s_add[l]) * (SOS_W+32)'(a.alpha_k);
      x0[l] = (|xp[SOS_W+31:64]) ? 32'hFFFF_FFFF : xp[63:32];
      pr    = (DATA_W+17)'(vc) * $signed({1'b0, f1[l]});
      outv[l] = data_t'(pr >>> 15);
      fin.wen[l] = land_en[N_NORM + l];
      fin.wdata[l*DATA_W +: DATA_W] = outv[l];
    end
  end
  assign f_push = land_valid && !land_pre;

  // ---------------- control ----------------
  assign busy = (state != S_IDLE);

  logic last_group;
  assign last_group = (j + 32'(N_NORM) >= 32'(a.hw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; a <= '0; h <= '0; h_off <= '0; npre <= '0;
      i <= '0; j <= '0; c_off <= '0; issue_left <= 1'b0; done <= 1'b0;
      land_valid <= 1'b0; land_pre <= 1'b0; land_first <= 1'b0; land_j <= '0;
      land_en <= '0; land_waddr <= '0;
      for (int n = 0; n < MAX_HW; n++) sos[n] <= '0;
    end else begin
      done <= 1'b0;
      land_valid <= rd_valid && rd_ready;
      if (rd_valid && rd_ready) begin
        land_pre   <= (state == S_PRE);
        land_first <= (i == '0);
        land_j     <= j;
        land_en    <= rd_en;
        land_waddr <= a.out_base + c_off + j;
      end
      if (land_valid)
        for (int l = 0; l < N_NORM; l++)
          if (land_j + 32'(l) < 32'(a.hw))
            sos[(land_j + 32'(l)) % MAX_HW] <= land_pre ? s_add[l] : s_next[l];

      unique case (state)
        S_IDLE: if (start) begin a <= args; state <= S_SETUP; end
        S_SETUP: begin
          h     <= a.k >> 1;
          h_off <= 32'(a.k >> 1) * 32'(a.hw);
          npre  <= (a.k >> 1) == 0 ? 16'd1 : 16'(a.k >> 1);
          i <= '0; j <= '0; c_off <= '0; issue_left <= 1'b1;
          state <= S_PRE;
        end
        S_PRE: if (rd_valid && rd_ready) begin
          j <= j + 32'(N_NORM);
          if (last_group) begin
            j <= '0;
            if (i + 16'd1 == npre) begin i <= '0; c_off <= '0; state <= S_MAIN; end
            else begin i <= i + 16'd1; c_off <= c_off + 32'(a.hw); end
          end
        end
        S_MAIN: begin
          if (rd_valid && rd_ready) begin
            j <= j + 32'(N_NORM);
            if (last_group) begin
              j <= '0; i <= i + 16'd1; c_off <= c_off + 32'(a.hw);
              if (i + 16'd1 == a.nfeat) issue_left <= 1'b0;
            end
          end
          if (!issue_left && !land_valid && !f_nonempty) begin
            done <= 1'b1; state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rvalid_latency: assert property (@(posedge clk) disable iff (!rst_n) rd_rvalid == land_valid);
  a_hw_fits:        assert property (@(posedge clk) disable iff (!rst_n) busy |-> 32'(a.hw) <= MAX_HW);
endmodule
