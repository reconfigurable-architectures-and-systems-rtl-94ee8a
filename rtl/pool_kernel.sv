// Max-pooling kernel.
//
//   out(f, oy, ox) = max over 0 <= ky, kx < K of in(f, oy*s + ky, ox*s + kx)
//
// A single work-item loop over features, output rows and output columns,
// unrolled so that N_POOL neighbouring outputs of one row are produced per
// cycle. Each beat gathers the N_POOL windows (N_POOL * KMAX * KMAX lanes,
// lanes outside the K x K window or outside the input map disabled, so a
// window that overhangs the edge takes the maximum of what lies inside),
// and the maximum of each window is written when the data return. Results
// pass through a two-entry buffer, so a beat is issued every cycle unless a
// port stalls. Memory ports and start/done as in the other kernels.
//
// Max pooling over K x K windows and N_POOL = 1 follow the accelerator
// description. KMAX = 3 (the 3 x 3 pooling of AlexNet), the stride argument
// and the edge rule are this design's choices.
module pool_kernel
  import cnn_pkg::*;
#(
  parameter int unsigned N_POOL = 1,
  parameter int unsigned KMAX   = 3
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  pool_args_t                       args,
  output logic                             busy,
  output logic                             done,
  output logic                             rd_valid,
  output addr_t [N_POOL*KMAX*KMAX-1:0]     rd_addr,
  output logic  [N_POOL*KMAX*KMAX-1:0]     rd_en,
  input  logic                             rd_ready,
  input  logic                             rd_rvalid,
  input  data_t [N_POOL*KMAX*KMAX-1:0]     rd_rdata,
  output logic                             wr_valid,
  output addr_t [N_POOL-1:0]               wr_addr,
  output logic  [N_POOL-1:0]               wr_en,
  output data_t [N_POOL-1:0]               wr_data,
  input  logic                             wr_ready
);
  localparam int unsigned WIN = KMAX * KMAX;
  localparam int unsigned RL  = N_POOL * WIN;

  typedef struct packed {
    addr_t                    waddr;
    logic [N_POOL-1:0]        wen;
    logic [N_POOL*DATA_W-1:0] wdata;
  } res_t;

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_RUN} state_t;
  state_t state;

  pool_args_t  a;
  logic [31:0] ihw, row_step;        // in_h*in_w, stride*in_w
  logic [15:0] f, oy, ox;
  logic [31:0] f_off, ir_off, or_off; // f*ihw, oy*stride*in_w, f*ohw + oy*out_w
  logic        issue_left;

  logic          land_valid;
  logic [RL-1:0] land_en;
  addr_t         land_waddr;
  logic [N_POOL-1:0] land_wen;

  res_t       fin, fout;
  logic       f_push, f_pop, f_nonempty;
  logic [1:0] f_count;

  res_fifo #(.W($bits(res_t))) u_fifo (
    .clk, .rst_n, .push(f_push), .din(fin), .pop(f_pop), .dout(fout),
    .nonempty(f_nonempty), .count(f_count));

  assign f_pop    = wr_valid && wr_ready;
  assign wr_valid = f_nonempty;
  for (genvar q = 0; q < N_POOL; q++) begin : g_wr
    assign wr_addr[q] = fout.waddr + 32'(q);
    assign wr_en[q]   = fout.wen[q];
    assign wr_data[q] = fout.wdata[q*DATA_W +: DATA_W];
  end

  logic room;
  assign room = (3'(f_count) - 3'(f_pop) + 3'(land_valid)) < 3'd2;
  assign rd_valid = (state == S_RUN) && issue_left && room;

  logic [N_POOL-1:0] beat_wen;
  always_comb begin
    for (int q = 0; q < N_POOL; q++) begin
      logic [31:0] oxq;
      oxq = 32'(ox) + 32'(q);
      beat_wen[q] = oxq < 32'(a.out_w);
      for (int ky = 0; ky < KMAX; ky++)
        for (int kx = 0; kx < KMAX; kx++) begin
          int unsigned ln;
          logic [31:0] iy, ix;
          ln = q * WIN + ky * KMAX + kx;
          iy = 32'(oy) * 32'(a.stride) + 32'(ky);
          ix = oxq * 32'(a.stride) + 32'(kx);
          rd_addr[ln] = a.in_base + f_off + ir_off + 32'(ky) * 32'(a.in_w) + ix;
          rd_en[ln]   = beat_wen[q] && (ky < int'(a.k)) && (kx < int'(a.k)) &&
                        (iy < 32'(a.in_h)) && (ix < 32'(a.in_w));
        end
    end
  end

  // window maxima of the returning beat
  always_comb begin
    fin = '0;
    fin.waddr = land_waddr;
    fin.wen   = land_wen;
    for (int q = 0; q < N_POOL; q++) begin
      data_t m;
      m = data_t'(-(2**(DATA_W-1)));
      for (int w = 0; w < WIN; w++)
        if (land_en[q*WIN + w] && rd_rdata[q*WIN + w] > m) m = rd_rdata[q*WIN + w];
      fin.wdata[q*DATA_W +: DATA_W] = m;
    end
  end
  assign f_push = land_valid;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; a <= '0; ihw <= '0; row_step <= '0;
      f <= '0; oy <= '0; ox <= '0; f_off <= '0; ir_off <= '0; or_off <= '0;
      issue_left <= 1'b0; done <= 1'b0;
      land_valid <= 1'b0; land_en <= '0; land_waddr <= '0; land_wen <= '0;
    end else begin
      done <= 1'b0;
      land_valid <= rd_valid && rd_ready;
      if (rd_valid && rd_ready) begin
        land_en    <= rd_en;
        land_wen   <= beat_wen;
        land_waddr <= a.out_base + or_off + 32'(ox);
      end
      unique case (state)
        S_IDLE: if (start) begin a <= args; state <= S_SETUP; end
        S_SETUP: begin
          ihw      <= 32'(a.in_h) * 32'(a.in_w);
          row_step <= 32'(a.stride) * 32'(a.in_w);
          f <= '0; oy <= '0; ox <= '0; f_off <= '0; ir_off <= '0; or_off <= '0;
          issue_left <= 1'b1;
          state <= S_RUN;
        end
        S_RUN: begin
          if (rd_valid && rd_ready) begin
            ox <= ox + 16'(N_POOL);
            if (32'(ox) + 32'(N_POOL) >= 32'(a.out_w)) begin
              ox <= '0;
              or_off <= or_off + 32'(a.out_w);
              if (oy + 16'd1 == a.out_h) begin
                oy <= '0; ir_off <= '0;
                f <= f + 16'd1; f_off <= f_off + ihw;
                if (f + 16'd1 == a.nfeat) issue_left <= 1'b0;
              end else begin
                oy <= oy + 16'd1; ir_off <= ir_off + row_step;
              end
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
  a_k_fits:         assert property (@(posedge clk) disable iff (!rst_n) busy |-> 32'(a.k) <= KMAX);
endmodule
