// Fully connected (inner product) kernel.
//
//   out(fo) = sum over fi of wt(fo, fi) * in(fi),  then rescale and ReLU.
//
// A single work-item loop over output neurons whose inner loop over inputs
// is unrolled N_FC times: each beat reads N_FC weights and the N_FC matching
// inputs (2 * N_FC lanes) and, when they return, adds their N_FC products to
// the accumulator, so N_FC MACs per cycle and ceil(nin / N_FC) beats per
// output. Lanes past the end of the input vector are disabled and add
// nothing. After the last beat of an output has returned, the accumulator
// is rescaled, passed through ReLU when the flag is set, and written.
// Memory ports and start/done as in the other kernels.
//
// The N_FC-way unrolled MAC, N_FC = 71 (the AlexNet configuration of the
// larger board), 8-bit weights and the ReLU flag follow the accelerator
// description. Weight layout, accumulator width and rescaling are this
// design's choices, and each output waits for its last beat before the
// next output starts.
module fc_kernel
  import cnn_pkg::*;
#(
  parameter int unsigned N_FC = 71
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  fc_args_t               args,
  output logic                   busy,
  output logic                   done,
  output logic                   mac_fire,
  output logic                   rd_valid,
  output addr_t [2*N_FC-1:0]     rd_addr,
  output logic  [2*N_FC-1:0]     rd_en,
  input  logic                   rd_ready,
  input  logic                   rd_rvalid,
  input  data_t [2*N_FC-1:0]     rd_rdata,
  output logic                   wr_valid,
  output addr_t [0:0]            wr_addr,
  output logic  [0:0]            wr_en,
  output data_t [0:0]            wr_data,
  input  logic                   wr_ready
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_WRITE} state_t;
  state_t state;

  fc_args_t    a;
  logic [15:0] fo;
  logic [31:0] fi;
  logic [31:0] w_off;   // fo * nin
  acc_t        acc;
  logic        land_valid, land_first;
  logic [2*N_FC-1:0] land_en;

  assign rd_valid = (state == S_RUN);
  always_comb begin
    for (int l = 0; l < N_FC; l++) begin
      rd_addr[l]        = a.wt_base + w_off + fi + 32'(l);
      rd_addr[N_FC + l] = a.in_base + fi + 32'(l);
      rd_en[l]          = (fi + 32'(l) < 32'(a.nin));
      rd_en[N_FC + l]   = rd_en[l];
    end
  end

  acc_t sum;
  always_comb begin
    sum = '0;
    for (int l = 0; l < N_FC; l++)
      if (land_en[l] && land_en[N_FC + l])
        sum += acc_t'(wt_t'(rd_rdata[l])) * acc_t'(rd_rdata[N_FC + l]);
  end
  assign mac_fire = land_valid;

  data_t res;
  relu_sat #(.AW(ACC_W)) u_rs (.acc(acc), .shift(a.shift), .relu_en(a.relu), .y(res));

  assign wr_valid   = (state == S_WRITE);
  assign wr_addr[0] = a.out_base + 32'(fo);
  assign wr_en[0]   = 1'b1;
  assign wr_data[0] = res;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; a <= '0; fo <= '0; fi <= '0; w_off <= '0; acc <= '0;
      land_valid <= 1'b0; land_first <= 1'b0; land_en <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      land_valid <= rd_valid && rd_ready;
      if (rd_valid && rd_ready) begin
        land_en    <= rd_en;
        land_first <= (fi == '0);
      end
      if (land_valid) acc <= (land_first ? '0 : acc) + sum;

      unique case (state)
        S_IDLE: if (start) begin
          a <= args; fo <= '0; fi <= '0; w_off <= '0;
          state <= (args.nout == 0) ? S_IDLE : S_RUN;
          done  <= (args.nout == 0);
        end
        S_RUN: if (rd_ready) begin
          fi <= fi + 32'(N_FC);
          if (fi + 32'(N_FC) >= 32'(a.nin)) state <= S_DRAIN;
        end
        S_DRAIN: if (!land_valid) state <= S_WRITE;
        S_WRITE: if (wr_ready) begin
          fi <= '0;
          w_off <= w_off + 32'(a.nin);
          fo <= fo + 16'd1;
          if (fo + 16'd1 == a.nout) begin done <= 1'b1; state <= S_IDLE; end
          else state <= S_RUN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rvalid_latency: assert property (@(posedge clk) disable iff (!rst_n) rd_rvalid == land_valid);
endmodule
