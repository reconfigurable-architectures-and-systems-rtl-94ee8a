// Self-checking testbench of the piecewise-linear unit: sweeps x0 over the
// table range (plus random points and the clamp region) and compares with
// (1 + x0)^-0.75 computed in real arithmetic. Passes within 1 % + 1 LSB
// inside the range, and at the held end value above it.
module tb_pwl_unit;
  logic [31:0] x;
  logic [15:0] y;
  int checks = 0, failures = 0;

  pwl_unit dut (.x, .y);

  task automatic check(logic [31:0] xv);
    real xr, t, tol;
    x = xv; #1;
    xr = real'(xv) / 65536.0;
    if (xr > 79.6) xr = 79.6;
    t = 32768.0 * $pow(1.0 + xr, -0.75);
    tol = t * 0.01 + 1.0;
    checks++;
    if ((real'(y) - t) > tol || (t - real'(y)) > tol) begin
      failures++;
      if (failures < 10) $display("x=%f y=%0d exp=%f", real'(xv) / 65536.0, y, t);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) check(32'(i) * 32'd1305);
    for (int i = 0; i < 2000; i++) check($urandom_range(5218956));
    check(32'd6000000);
    check(32'hFFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
