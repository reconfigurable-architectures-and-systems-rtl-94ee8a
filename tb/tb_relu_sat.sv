// Self-checking testbench of the rescale/saturate/ReLU stage: random
// accumulators and shifts, plus the saturation corners, compared with a
// reference computed in 64-bit integer arithmetic.
module tb_relu_sat;
  import cnn_pkg::*;
  acc_t acc;
  logic [5:0] shift;
  logic relu_en;
  data_t y;
  int checks = 0, failures = 0;

  relu_sat dut (.acc, .shift, .relu_en, .y);

  task automatic check(longint av, int sh, bit re);
    longint s;
    acc = acc_t'(av); shift = 6'(sh); relu_en = re; #1;
    s = longint'(acc) >>> sh;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    if (re && s < 0) s = 0;
    checks++;
    if (y !== data_t'(s)) begin
      failures++;
      if (failures < 10) $display("acc=%0d sh=%0d relu=%0d y=%0d exp=%0d", av, sh, re, y, s);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++)
      check(longint'({$urandom, $urandom}) >>> $urandom_range(40), $urandom_range(24), 1'($urandom));
    check(32767, 0, 0); check(32768, 0, 0); check(-32768, 0, 0); check(-32769, 0, 0);
    check(-5, 0, 1); check(-5, 0, 0); check(1 << 30, 15, 0); check(-(1 << 30), 14, 1);
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
