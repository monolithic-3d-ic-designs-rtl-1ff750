// tb_mac_unit: self-checking test of one MAC lane.
// Drives random runs of signed 8-bit weight/neuron pairs (including the
// extreme values), starts each run with `first`, inserts idle cycles with
// `en` low, and compares the accumulator one cycle after every product with
// a sum kept in the testbench.
module tb_mac_unit;
  import dnn_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0;
  weight_t weight = '0;
  neuron_t neuron = '0;
  acc_t acc;
  int checks = 0, failures = 0;
  longint ref_sum;

  mac_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_sum = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    if (acc !== '0) failures++;
    checks++;
    for (int run = 0; run < 60; run++) begin
      automatic int len = 1 + ($urandom % 130);
      for (int i = 0; i < len; i++) begin
        en    = ($urandom % 5) != 0 || i == 0;
        first = (i == 0);
        if (run == 0) begin
          weight = -128; neuron = -128;
        end else if (run == 1) begin
          weight = 127; neuron = -128;
        end else begin
          weight = weight_t'($urandom); neuron = neuron_t'($urandom);
        end
        if (en) ref_sum = first ? longint'(weight) * neuron : ref_sum + longint'(weight) * neuron;
        @(negedge clk);
        checks++;
        if (acc !== acc_t'(ref_sum)) begin
          failures++;
          $display("mismatch run %0d i %0d: acc=%0d expected %0d", run, i, acc, ref_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
