// Shared types and constants of the CNN accelerator kernels.
//
// All external memory is an array of 16-bit words addressed by 32-bit word
// addresses. Layer data (features, neurons) are 16-bit signed fixed point,
// as chosen by the precision study (16-bit intermediate data). Weights are
// 8-bit signed and are stored one per 16-bit word, in its low byte. Each
// kernel receives its layer arguments as one packed struct when the host
// launches it, the way an OpenCL host passes buffer addresses and layer
// dimensions as kernel arguments. The word layout, the fixed-point scaling
// by a run-time shift and the argument structs are this design's choices.
package cnn_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 16;  // feature data width
  localparam int unsigned WT_W   = 8;   // weight width
  localparam int unsigned ACC_W  = 40;  // MAC accumulator width

  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [WT_W-1:0]   wt_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Convolution layer. Input feature fi, row y, column x is at
  // in_base + fi*in_h*in_w + y*in_w + x. Weight (fo, fi, ky, kx) is at
  // wt_base + fo*(nif*k*k) + fi*k*k + ky*k + kx. Output feature fo at
  // output position p = oy*out_w + ox is at out_base + fo*out_h*out_w + p.
  typedef struct packed {
    addr_t       in_base;
    addr_t       wt_base;
    addr_t       out_base;
    logic [15:0] nif;     // input features
    logic [15:0] in_h;
    logic [15:0] in_w;
    logic [15:0] nof;     // output features (rows of the weight matrix)
    logic [15:0] out_h;
    logic [15:0] out_w;
    logic [3:0]  k;       // filter size K (K x K)
    logic [3:0]  stride;
    logic [3:0]  pad;     // zero border around the input features
    logic [5:0]  shift;   // accumulator right shift to output scale
    logic        relu;    // ReLU enable flag
  } conv_args_t;

  // Local response normalisation across features. Neuron j of feature i is
  // at base + i*hw + j. x0 = alpha_k * sum_of_squares, alpha_k = alpha/K as
  // an unsigned 0.32 fraction; the sum of squares is in Q16.16 when the data
  // are Q8.8.
  typedef struct packed {
    addr_t       in_base;
    addr_t       out_base;
    logic [15:0] nfeat;
    logic [15:0] hw;      // neurons per feature (height * width)
    logic [3:0]  k;       // odd window of neighbouring features
    logic [31:0] alpha_k; // alpha / K, unsigned 0.32
  } lrn_args_t;

  // Max pooling, same feature layout as convolution.
  typedef struct packed {
    addr_t       in_base;
    addr_t       out_base;
    logic [15:0] nfeat;
    logic [15:0] in_h;
    logic [15:0] in_w;
    logic [15:0] out_h;
    logic [15:0] out_w;
    logic [3:0]  k;
    logic [3:0]  stride;
  } pool_args_t;

  // Fully connected layer: out[fo] = sum_fi wt[fo*nin + fi] * in[fi].
  typedef struct packed {
    addr_t       in_base;
    addr_t       wt_base;
    addr_t       out_base;
    logic [15:0] nin;
    logic [15:0] nout;
    logic [5:0]  shift;
    logic        relu;
  } fc_args_t;

endpackage
