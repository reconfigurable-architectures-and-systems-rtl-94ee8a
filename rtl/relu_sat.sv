// Output stage shared by the convolution and fully connected kernels.
//
// Brings a MAC accumulator back to the 16-bit data format: an arithmetic
// right shift by a run-time amount (the fixed-point scale of the layer),
// saturation to the signed 16-bit range, then the ReLU activation
// y = max(x, 0) when relu_en is set. ReLU with an enable flag at the
// kernel outputs follows the accelerator description; the shift and the
// saturation are this design's choice of fixed-point rescaling.
// Purely combinational.
module relu_sat
  import cnn_pkg::*;
#(
  parameter int unsigned AW = ACC_W
) (
  input  logic signed [AW-1:0] acc,
  input  logic [5:0]           shift,
  input  logic                 relu_en,
  output data_t                y
);
  localparam logic signed [AW-1:0] MAXV = AW'(2**(DATA_W-1) - 1);
  localparam logic signed [AW-1:0] MINV = -AW'(2**(DATA_W-1));

  logic signed [AW-1:0] sh;
  data_t                sat;

  always_comb begin
    sh = acc >>> shift;
    if (sh > MAXV)      sat = data_t'(MAXV);
    else if (sh < MINV) sat = data_t'(MINV);
    else                sat = data_t'(sh);
    y = (relu_en && sat < 0) ? '0 : sat;
  end
endmodule
