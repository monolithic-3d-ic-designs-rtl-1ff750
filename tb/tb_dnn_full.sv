// tb_dnn_full: end-to-end test of dnn_top at its default sizes: 440 inputs,
// four 1024-neuron hidden layers, 1,947 outputs, 16x16 CGS blocks with 8 of
// 64 blocks kept per block row, 16 MAC lanes, six 8192-row weight banks.
// It runs the same three frames as tb_dnn_top (classification, classification
// with a concurrent rewrite of all layer-0 weights, classification with the
// new weights), checks all 1,947 scores of each frame against the reference
// model and the 49,167-cycle frame time, and counts the same mechanisms.
module tb_dnn_full;
  import dnn_pkg::*;
  localparam int N = 1024, N_IN = 440, N_OUT = 1947, BS = 16, MACS = 16, L = 5;
  localparam int KEEP = N / BS / 8;
  localparam int WATCHDOG = 400000;
  `include "tb_dnn_body.svh"

  initial begin
    @all_done;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dnn_top dut (.*);
endmodule
