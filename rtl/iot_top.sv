// IoT node hardware: a CNN accelerator for the processing side and the
// configuration interface of the PANDA programmable analog front end.
//
// The two parts do not share signals and stand side by side.
//
// CNN accelerator: four independent layer kernels (convolution as tiled
// matrix multiplication, local response normalisation, max pooling, fully
// connected). A host launches one kernel at a time with its layer
// arguments (start/args, then waits for done), and iterates a whole network
// through them layer by layer; each kernel reads its inputs from, and
// writes its results to, the external memory through its own gather/scatter
// port, brought out here. Parameters default to the configuration chosen
// for AlexNet on the larger of the two boards (N_CONV = 64, S_CONV = 8,
// N_NORM = 2, N_POOL = 1, N_FC = 71). The external DDR memory, its
// load/store units and the host are outside this design.
//
// PANDA configuration: the SPI slave, address decoders, 16 KB configuration
// memory and test registers. cfg is every configuration bit the analog
// array (cells, connection and switch blocks) would receive.
//
// Clocks: clk for the accelerator, sclk (the SPI clock) for the
// configuration interface. rst_n resets the accelerator, panda_rst_n the
// configuration interface.
module iot_top
  import cnn_pkg::*;
  import panda_pkg::*;
#(
  parameter int unsigned N_CONV        = 64,
  parameter int unsigned S_CONV        = 8,
  parameter int unsigned N_NORM        = 2,
  parameter int unsigned MAX_HW        = 3025,
  parameter int unsigned N_POOL        = 1,
  parameter int unsigned KMAX          = 3,
  parameter int unsigned N_FC          = 71,
  parameter int unsigned NUM_TEST_REGS = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // convolution kernel
  input  logic                              conv_start,
  input  conv_args_t                        conv_args,
  output logic                              conv_busy,
  output logic                              conv_done,
  output logic                              conv_mac_fire,
  output logic                              conv_rd_valid,
  output addr_t [S_CONV-1:0]                conv_rd_addr,
  output logic  [S_CONV-1:0]                conv_rd_en,
  input  logic                              conv_rd_ready,
  input  logic                              conv_rd_rvalid,
  input  data_t [S_CONV-1:0]                conv_rd_rdata,
  output logic                              conv_wr_valid,
  output addr_t [S_CONV-1:0]                conv_wr_addr,
  output logic  [S_CONV-1:0]                conv_wr_en,
  output data_t [S_CONV-1:0]                conv_wr_data,
  input  logic                              conv_wr_ready,
  // normalisation kernel
  input  logic                              lrn_start,
  input  lrn_args_t                         lrn_args,
  output logic                              lrn_busy,
  output logic                              lrn_done,
  output logic                              lrn_rd_valid,
  output addr_t [3*N_NORM-1:0]              lrn_rd_addr,
  output logic  [3*N_NORM-1:0]              lrn_rd_en,
  input  logic                              lrn_rd_ready,
  input  logic                              lrn_rd_rvalid,
  input  data_t [3*N_NORM-1:0]              lrn_rd_rdata,
  output logic                              lrn_wr_valid,
  output addr_t [N_NORM-1:0]                lrn_wr_addr,
  output logic  [N_NORM-1:0]                lrn_wr_en,
  output data_t [N_NORM-1:0]                lrn_wr_data,
  input  logic                              lrn_wr_ready,
  // pooling kernel
  input  logic                              pool_start,
  input  pool_args_t                        pool_args,
  output logic                              pool_busy,
  output logic                              pool_done,
  output logic                              pool_rd_valid,
  output addr_t [N_POOL*KMAX*KMAX-1:0]      pool_rd_addr,
  output logic  [N_POOL*KMAX*KMAX-1:0]      pool_rd_en,
  input  logic                              pool_rd_ready,
  input  logic                              pool_rd_rvalid,
  input  data_t [N_POOL*KMAX*KMAX-1:0]      pool_rd_rdata,
  output logic                              pool_wr_valid,
  output addr_t [N_POOL-1:0]                pool_wr_addr,
  output logic  [N_POOL-1:0]                pool_wr_en,
  output data_t [N_POOL-1:0]                pool_wr_data,
  input  logic                              pool_wr_ready,
  // fully connected kernel
  input  logic                              fc_start,
  input  fc_args_t                          fc_args,
  output logic                              fc_busy,
  output logic                              fc_done,
  output logic                              fc_mac_fire,
  output logic                              fc_rd_valid,
  output addr_t [2*N_FC-1:0]                fc_rd_addr,
  output logic  [2*N_FC-1:0]                fc_rd_en,
  input  logic                              fc_rd_ready,
  input  logic                              fc_rd_rvalid,
  input  data_t [2*N_FC-1:0]                fc_rd_rdata,
  output logic                              fc_wr_valid,
  output addr_t [0:0]                       fc_wr_addr,
  output logic  [0:0]                       fc_wr_en,
  output data_t [0:0]                       fc_wr_data,
  input  logic                              fc_wr_ready,
  // PANDA configuration interface
  input  logic                              panda_rst_n,
  input  logic                              sclk,
  input  logic                              cs_n,
  input  logic                              mosi,
  output logic                              miso,
  output logic [7:0]                        cfg [ROWS][COLS],
  output logic [7:0]                        test_q [NUM_TEST_REGS]
);
  conv_kernel #(.N_CONV(N_CONV), .S_CONV(S_CONV)) u_conv (
    .clk, .rst_n, .start(conv_start), .args(conv_args), .busy(conv_busy), .done(conv_done),
    .mac_fire(conv_mac_fire),
    .rd_valid(conv_rd_valid), .rd_addr(conv_rd_addr), .rd_en(conv_rd_en), .rd_ready(conv_rd_ready),
    .rd_rvalid(conv_rd_rvalid), .rd_rdata(conv_rd_rdata),
    .wr_valid(conv_wr_valid), .wr_addr(conv_wr_addr), .wr_en(conv_wr_en), .wr_data(conv_wr_data),
    .wr_ready(conv_wr_ready));

  lrn_kernel #(.N_NORM(N_NORM), .MAX_HW(MAX_HW)) u_lrn (
    .clk, .rst_n, .start(lrn_start), .args(lrn_args), .busy(lrn_busy), .done(lrn_done),
    .rd_valid(lrn_rd_valid), .rd_addr(lrn_rd_addr), .rd_en(lrn_rd_en), .rd_ready(lrn_rd_ready),
    .rd_rvalid(lrn_rd_rvalid), .rd_rdata(lrn_rd_rdata),
    .wr_valid(lrn_wr_valid), .wr_addr(lrn_wr_addr), .wr_en(lrn_wr_en), .wr_data(lrn_wr_data),
    .wr_ready(lrn_wr_ready));

  pool_kernel #(.N_POOL(N_POOL), .KMAX(KMAX)) u_pool (
    .clk, .rst_n, .start(pool_start), .args(pool_args), .busy(pool_busy), .done(pool_done),
    .rd_valid(pool_rd_valid), .rd_addr(pool_rd_addr), .rd_en(pool_rd_en), .rd_ready(pool_rd_ready),
    .rd_rvalid(pool_rd_rvalid), .rd_rdata(pool_rd_rdata),
    .wr_valid(pool_wr_valid), .wr_addr(pool_wr_addr), .wr_en(pool_wr_en), .wr_data(pool_wr_data),
    .wr_ready(pool_wr_ready));

  fc_kernel #(.N_FC(N_FC)) u_fc (
    .clk, .rst_n, .start(fc_start), .args(fc_args), .busy(fc_busy), .done(fc_done),
    .mac_fire(fc_mac_fire),
    .rd_valid(fc_rd_valid), .rd_addr(fc_rd_addr), .rd_en(fc_rd_en), .rd_ready(fc_rd_ready),
    .rd_rvalid(fc_rd_rvalid), .rd_rdata(fc_rd_rdata),
    .wr_valid(fc_wr_valid), .wr_addr(fc_wr_addr), .wr_en(fc_wr_en), .wr_data(fc_wr_data),
    .wr_ready(fc_wr_ready));

  panda_config #(.NUM_TEST_REGS(NUM_TEST_REGS)) u_panda (
    .rst_n(panda_rst_n), .sclk, .cs_n, .mosi, .miso, .cfg, .test_q);
endmodule
