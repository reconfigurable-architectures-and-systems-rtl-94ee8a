// Piecewise-linear approximation of the LRN scaling function
//   f1(x0) = (1 + x0)^(-beta),   beta = 0.75,
// built from 20 points, as the normalisation kernel requires. x0 is an
// unsigned Q16.16 number; the result is unsigned Q1.15 (32768 = 1.0).
//
// The breakpoints are spaced geometrically, x_k = 2^(k/3) - 1 for
// k = 0..19 (0 .. 79.6), which keeps the relative error of the chords below
// 1 % over that range; above x_19 the last value is held. Table contents:
//   X[k] = round(65536 * (2^(k/3) - 1))
//   Y[k] = round(32768 * 2^(-beta*k/3))
//   S[k] = round((Y[k] - Y[k+1]) * 2^24 / (X[k+1] - X[k]))
// and f = Y[k] - ((x - X[k]) * S[k]) >> 24 inside segment k.
// Combinational: 19 comparators pick the segment, one multiplier
// interpolates. The 20-point count and the 1 % target follow the
// accelerator description; beta = 0.75 (the AlexNet value), the spacing of
// the points and the fixed-point formats are this design's choices.
module pwl_unit #(
  parameter int unsigned PWL_POINTS = 20
) (
  input  logic [31:0] x,
  output logic [15:0] y
);
  localparam logic [31:0] X [20] = '{
    32'd0, 32'd17034, 32'd38496, 32'd65536, 32'd99604, 32'd142528, 32'd196608,
    32'd264745, 32'd350592, 32'd458752, 32'd595025, 32'd766719, 32'd983040,
    32'd1255587, 32'd1598975, 32'd2031616, 32'd2576710, 32'd3263485,
    32'd4128768, 32'd5218956};
  localparam logic [15:0] Y [20] = '{
    16'd32768, 16'd27555, 16'd23170, 16'd19484, 16'd16384, 16'd13777, 16'd11585,
    16'd9742, 16'd8192, 16'd6889, 16'd5793, 16'd4871, 16'd4096, 16'd3444,
    16'd2896, 16'd2435, 16'd2048, 16'd1722, 16'd1448, 16'd1218};
  localparam logic [23:0] S [19] = '{
    24'd5134415, 24'd3427830, 24'd2287013, 24'd1526634, 24'd1018968, 24'd680023,
    24'd453798, 24'd302919, 24'd202115, 24'd134934, 24'd90094, 24'd60107,
    24'd40135, 24'd26774, 24'd17877, 24'd11911, 24'd7964, 24'd5313, 24'd3540};

  if (PWL_POINTS != 20) begin : g_bad_points
    $error("pwl_unit: the table is built for 20 points");
  end

  logic [4:0]  seg;
  logic [31:0] dx;
  logic [55:0] prod;

  always_comb begin
    seg = '0;
    for (int k = 1; k < 20; k++)
      if (x >= X[k]) seg = 5'(k);
    dx   = x - X[seg];
    prod = 56'(dx) * 56'(S[seg < 5'd19 ? seg : 5'd18]);
    if (seg == 5'd19) y = Y[19];
    else              y = Y[seg] - 16'(prod >> 24);
  end
endmodule
