// tb_neuron_regs: self-checking test of the input/output neuron registers.
// Reduced size (32 inputs, 64 outputs, 4 lanes). Checks reset, host loads,
// clear, grouped result writes, host reads and the output-to-input copy.
module tb_neuron_regs;
  import dnn_pkg::*;
  localparam int N = 32, NOUT = 64, MACS = 4;
  logic clk = 0, rst_n = 0, in_clear = 0, in_we = 0, out_we = 0, swap = 0;
  logic [$clog2(N)-1:0] in_addr = '0;
  neuron_t in_data = '0;
  logic [$clog2(NOUT)-1:0] out_base = '0, rd_addr = '0;
  neuron_t out_data [MACS];
  neuron_t rd_data;
  neuron_t a [N];
  neuron_t ma [N], mb [NOUT];
  int checks = 0, failures = 0;

  neuron_regs #(.N(N), .NOUT(NOUT), .MACS(MACS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (a[i] !== ma[i]) begin failures++; $display("a[%0d]=%0d expected %0d", i, a[i], ma[i]); end
    end
    for (int i = 0; i < NOUT; i++) begin
      rd_addr = 6'(i);
      #1;
      checks++;
      if (rd_data !== mb[i]) begin failures++; $display("b[%0d]=%0d expected %0d", i, rd_data, mb[i]); end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) ma[i] = '0;
    for (int i = 0; i < NOUT; i++) mb[i] = '0;
    for (int m = 0; m < MACS; m++) out_data[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare();
    for (int round = 0; round < 20; round++) begin
      // host load of a few inputs
      for (int i = 0; i < 10; i++) begin
        in_we = 1; in_addr = 5'($urandom); in_data = neuron_t'($urandom);
        ma[in_addr] = in_data;
        @(negedge clk);
      end
      in_we = 0;
      if (round % 4 == 1) begin
        in_clear = 1;
        for (int i = 0; i < N; i++) ma[i] = '0;
        @(negedge clk);
        in_clear = 0;
      end
      compare();
      // grouped result writes covering all outputs
      for (int g = 0; g < NOUT / MACS; g++) begin
        out_we = 1; out_base = 6'(g * MACS);
        for (int m = 0; m < MACS; m++) begin
          out_data[m] = neuron_t'($urandom);
          mb[g * MACS + m] = out_data[m];
        end
        @(negedge clk);
      end
      out_we = 0;
      compare();
      // layer change
      swap = 1;
      for (int i = 0; i < N; i++) ma[i] = mb[i];
      @(negedge clk);
      swap = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
