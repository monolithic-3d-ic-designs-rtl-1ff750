// tb_relu_quant: self-checking test of the activation/requantisation unit.
// Applies random and corner accumulator values with every shift amount, with
// ReLU on and off, and compares with shift-clip arithmetic done in integers.
module tb_relu_quant;
  import dnn_pkg::*;
  acc_t acc;
  logic [SHW-1:0] shift;
  logic relu_en;
  neuron_t y;
  int checks = 0, failures = 0;

  relu_quant dut (.*);

  function automatic int expect_y(longint a, int s, bit r);
    longint v = a >>> s;
    if (r && v < 0) v = 0;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return int'(v);
  endfunction

  task automatic apply(longint a, int s, bit r);
    acc = acc_t'(a); shift = SHW'(s); relu_en = r;
    #1;
    checks++;
    if (int'(y) != expect_y(longint'(acc), s, r)) begin
      failures++;
      $display("mismatch acc=%0d shift=%0d relu=%0b y=%0d expected %0d", acc, s, r, y,
               expect_y(longint'(acc), s, r));
    end
  endtask

  initial begin
    apply(0, 0, 1); apply(127, 0, 0); apply(128, 0, 0); apply(-128, 0, 0);
    apply(-129, 0, 0); apply(-1, 0, 1); apply(-1, 3, 0); apply(8388607, 23, 0);
    apply(-8388608, 16, 0); apply(-8388608, 16, 1); apply(32767, 8, 1);
    for (int i = 0; i < 4000; i++) begin
      automatic int s = $urandom % 24;
      automatic longint a = longint'($signed(24'($urandom)));
      if (i % 3 == 0) a = a >>> ($urandom % 20);
      apply(a, s, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
