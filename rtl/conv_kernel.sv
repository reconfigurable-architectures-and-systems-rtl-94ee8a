// Convolution kernel: 3-D convolution computed as a tiled matrix product.
//
// The weights of a layer form matrix A (M x N, M = output features,
// N = input features * K * K) and the input features, flattened and
// rearranged window by window, form matrix B (N x P, P = output positions).
// Output matrix C = A x B holds the output features. B is never stored in
// external memory: while a tile of B is fetched, the address of every
// element in the original feature maps is computed from its row
// (feature, ky, kx) and column (oy, ox), and elements that fall in the zero
// border, or beyond the real matrix sizes, read as zero. This zero padding
// makes every matrix dimension a multiple of N_CONV.
//
// For every N_CONV x N_CONV tile of C the kernel loops over the N dimension
// in steps of N_CONV: it loads an N_CONV x N_CONV tile of A and of B into
// local memory (S_CONV words per cycle), then every work-item (x, y) of the
// tile performs N_CONV multiply-accumulates, S_CONV work-items per cycle,
// so N_CONV * S_CONV MACs per cycle (mac_fire is high in those cycles, and a
// k-step takes N_CONV*N_CONV/S_CONV of them). When the N dimension is done the
// tile is rescaled, passed through ReLU if enabled, and written back,
// S_CONV words per cycle. Loading and computing take turns, like the
// barrier-separated phases of the work-group.
//
// Memory ports: a request is accepted when valid && ready; read data
// returns exactly one cycle after acceptance (rd_rvalid). Loads are issued
// back to back; a low ready stalls them. start is sampled in idle, done
// pulses for one cycle at the end.
//
// The tiling, the local-memory MAC structure, N_CONV = 64 and S_CONV = 8
// (the configuration chosen for AlexNet on the larger board), 8-bit weights
// and 16-bit data follow the accelerator description. The memory layout,
// the 40-bit accumulator, the rescaling shift, and the strict alternation of
// load and compute phases are this design's choices.
module conv_kernel
  import cnn_pkg::*;
#(
  parameter int unsigned N_CONV = 64,
  parameter int unsigned S_CONV = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  conv_args_t                   args,
  output logic                         busy,
  output logic                         done,
  output logic                         mac_fire,
  // read port
  output logic                         rd_valid,
  output addr_t [S_CONV-1:0]           rd_addr,
  output logic  [S_CONV-1:0]           rd_en,
  input  logic                         rd_ready,
  input  logic                         rd_rvalid,
  input  data_t [S_CONV-1:0]           rd_rdata,
  // write port
  output logic                         wr_valid,
  output addr_t [S_CONV-1:0]           wr_addr,
  output logic  [S_CONV-1:0]           wr_en,
  output data_t [S_CONV-1:0]           wr_data,
  input  logic                         wr_ready
);
  localparam int unsigned NG  = N_CONV / S_CONV;  // lane groups per tile row
  localparam int unsigned TW  = $clog2(N_CONV);
  localparam int unsigned GW  = (NG > 1) ? $clog2(NG) : 1;

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_COLS, S_LOADA, S_LOADB, S_COMP, S_WRITE} state_t;
  state_t state;

  conv_args_t a;
  logic [31:0] n_dim, p_dim, hw;

  // tile origins and running offsets
  logic [31:0] m0, p0, n0;
  logic [31:0] mt_off;   // m0 * N
  logic [31:0] mp_off;   // m0 * P
  logic [31:0] roff;     // row offset during loads / writes

  // local memories
  wt_t   [N_CONV-1:0] wtile [N_CONV];   // A tile, row x packed over k
  data_t [N_CONV-1:0] itile [N_CONV];   // B tile, column y packed over k
  acc_t               acc   [N_CONV][N_CONV];

  // column tables of the current P tile
  logic signed [19:0] col_iy [N_CONV];
  logic signed [19:0] col_ix [N_CONV];
  logic               col_ok [N_CONV];
  logic [15:0]        b_oy, b_ox;

  // row decomposition of B: n = n0 + r -> (fi, ky, kx)
  logic [15:0] fi;
  logic [3:0]  ky, kx;
  logic [31:0] fi_off;

  // counters
  logic [TW-1:0] r;     // tile row (load, compute x, write x)
  logic [GW-1:0] g;     // lane group
  logic          issue_left;
  logic          first_k;

  // landing stage of the read pipeline
  logic              land_valid, land_isa;
  logic [TW-1:0]     land_r;
  logic [GW-1:0]     land_g;
  logic [S_CONV-1:0] land_en;

  logic last_beat;
  assign last_beat = (r == TW'(N_CONV-1)) && (g == GW'(NG-1));

  // ---------------- address generation ----------------
  always_comb begin
    rd_valid = (state == S_LOADA || state == S_LOADB) && issue_left;
    for (int l = 0; l < S_CONV; l++) begin
      int unsigned c;
      logic signed [19:0] iy, ix;
      logic signed [31:0] off;
      c = int'(g) * S_CONV + l;
      iy = col_iy[c] + 20'($signed({1'b0, ky}));
      ix = col_ix[c] + 20'($signed({1'b0, kx}));
      off = 32'(iy) * 32'($signed({1'b0, a.in_w})) + 32'(ix);
      if (state == S_LOADA) begin
        rd_addr[l] = a.wt_base + roff + n0 + 32'(c);
        rd_en[l]   = (m0 + 32'(r) < 32'(a.nof)) && (n0 + 32'(c) < n_dim);
      end else begin
        rd_addr[l] = a.in_base + fi_off + off;
        rd_en[l]   = (n0 + 32'(r) < n_dim) && col_ok[c] &&
                     (iy >= 0) && (iy < 20'($signed({1'b0, a.in_h}))) &&
                     (ix >= 0) && (ix < 20'($signed({1'b0, a.in_w})));
      end
    end
  end

  // ---------------- compute: S_CONV work-items, N_CONV MACs each ----------------
  acc_t dot [S_CONV];
  logic can_comp;
  assign can_comp = (state == S_COMP) && !land_valid;
  assign mac_fire = can_comp;

  always_comb begin
    for (int l = 0; l < S_CONV; l++) begin
      dot[l] = '0;
      for (int k = 0; k < N_CONV; k++)
        dot[l] += acc_t'(wtile[r][k]) * acc_t'(itile[int'(g) * S_CONV + l][k]);
    end
  end

  // ---------------- write-back ----------------
  data_t wres [S_CONV];
  for (genvar l = 0; l < S_CONV; l++) begin : g_out
    relu_sat #(.AW(ACC_W)) u_rs (
      .acc(acc[r][int'(g) * S_CONV + l]), .shift(a.shift), .relu_en(a.relu), .y(wres[l]));
    assign wr_addr[l] = a.out_base + roff + p0 + 32'(int'(g) * S_CONV + l);
    assign wr_en[l]   = (m0 + 32'(r) < 32'(a.nof)) && (p0 + 32'(int'(g) * S_CONV + l) < p_dim);
    assign wr_data[l] = wres[l];
  end
  assign wr_valid = (state == S_WRITE);

  // ---------------- control ----------------
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a <= '0; n_dim <= '0; p_dim <= '0; hw <= '0;
      m0 <= '0; p0 <= '0; n0 <= '0; mt_off <= '0; mp_off <= '0; roff <= '0;
      b_oy <= '0; b_ox <= '0; fi <= '0; ky <= '0; kx <= '0; fi_off <= '0;
      r <= '0; g <= '0; issue_left <= 1'b0; first_k <= 1'b0; done <= 1'b0;
      land_valid <= 1'b0; land_isa <= 1'b0; land_r <= '0; land_g <= '0; land_en <= '0;
      for (int i = 0; i < N_CONV; i++) begin
        wtile[i] <= '0; itile[i] <= '0;
        col_iy[i] <= '0; col_ix[i] <= '0; col_ok[i] <= 1'b0;
        for (int j = 0; j < N_CONV; j++) acc[i][j] <= '0;
      end
    end else begin
      done <= 1'b0;

      // read data lands in local memory one cycle after acceptance
      land_valid <= rd_valid && rd_ready;
      if (rd_valid && rd_ready) begin
        land_isa <= (state == S_LOADA);
        land_r   <= r;
        land_g   <= g;
        land_en  <= rd_en;
      end
      if (land_valid) begin
        for (int l = 0; l < S_CONV; l++) begin
          if (land_isa) wtile[land_r][int'(land_g) * S_CONV + l] <= land_en[l] ? wt_t'(rd_rdata[l]) : '0;
          else          itile[int'(land_g) * S_CONV + l][land_r] <= land_en[l] ? rd_rdata[l] : '0;
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          a <= args;
          state <= S_SETUP;
        end
        S_SETUP: begin
          n_dim <= 32'(a.nif) * 32'(a.k) * 32'(a.k);
          p_dim <= 32'(a.out_h) * 32'(a.out_w);
          hw    <= 32'(a.in_h) * 32'(a.in_w);
          m0 <= '0; p0 <= '0; n0 <= '0; mt_off <= '0; mp_off <= '0;
          b_oy <= '0; b_ox <= '0; r <= '0;
          state <= S_COLS;
        end
        S_COLS: begin
          // one column of the P tile per cycle: window origin of (oy, ox)
          col_iy[r] <= 20'($signed({1'b0, b_oy})) * 20'($signed({1'b0, a.stride})) - 20'($signed({1'b0, a.pad}));
          col_ix[r] <= 20'($signed({1'b0, b_ox})) * 20'($signed({1'b0, a.stride})) - 20'($signed({1'b0, a.pad}));
          col_ok[r] <= (p0 + 32'(r) < p_dim);
          if (b_ox + 16'd1 == a.out_w) begin b_ox <= '0; b_oy <= b_oy + 16'd1; end
          else b_ox <= b_ox + 16'd1;
          r <= r + TW'(1);
          if (r == TW'(N_CONV-1)) begin
            n0 <= '0; fi <= '0; ky <= '0; kx <= '0; fi_off <= '0;
            first_k <= 1'b1;
            roff <= mt_off; g <= '0; issue_left <= 1'b1;
            state <= S_LOADA;
          end
        end
        S_LOADA: begin
          if (rd_valid && rd_ready) begin
            g <= g + GW'(1);
            if (g == GW'(NG-1)) begin
              g <= '0;
              r <= r + TW'(1);
              roff <= roff + n_dim;
            end
            if (last_beat) begin
              issue_left <= 1'b1;
              state <= S_LOADB;
            end
          end
        end
        S_LOADB: begin
          if (rd_valid && rd_ready) begin
            g <= g + GW'(1);
            if (g == GW'(NG-1)) begin
              g <= '0;
              r <= r + TW'(1);
              if (kx + 4'd1 == a.k) begin
                kx <= '0;
                if (ky + 4'd1 == a.k) begin
                  ky <= '0; fi <= fi + 16'd1; fi_off <= fi_off + hw;
                end else ky <= ky + 4'd1;
              end else kx <= kx + 4'd1;
            end
            if (last_beat) begin
              issue_left <= 1'b0;
              state <= S_COMP;
            end
          end
        end
        S_COMP: if (can_comp) begin
          for (int l = 0; l < S_CONV; l++)
            acc[r][int'(g) * S_CONV + l] <= first_k ? dot[l] : acc[r][int'(g) * S_CONV + l] + dot[l];
          g <= g + GW'(1);
          if (g == GW'(NG-1)) begin g <= '0; r <= r + TW'(1); end
          if (last_beat) begin
            first_k <= 1'b0;
            if (n0 + 32'(N_CONV) < n_dim) begin
              n0 <= n0 + 32'(N_CONV);
              roff <= mt_off; issue_left <= 1'b1;
              state <= S_LOADA;
            end else begin
              roff <= mp_off;
              state <= S_WRITE;
            end
          end
        end
        S_WRITE: if (wr_ready) begin
          g <= g + GW'(1);
          if (g == GW'(NG-1)) begin g <= '0; r <= r + TW'(1); roff <= roff + p_dim; end
          if (last_beat) begin
            if (p0 + 32'(N_CONV) < p_dim) begin
              p0 <= p0 + 32'(N_CONV);
              state <= S_COLS;
            end else if (m0 + 32'(N_CONV) < 32'(a.nof)) begin
              p0 <= '0; b_oy <= '0; b_ox <= '0;
              m0 <= m0 + 32'(N_CONV);
              mt_off <= mt_off + 32'(N_CONV) * n_dim;
              mp_off <= mp_off + 32'(N_CONV) * p_dim;
              state <= S_COLS;
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rvalid_latency: assert property (@(posedge clk) disable iff (!rst_n) rd_rvalid == land_valid);
  a_start_idle:     assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);
endmodule
