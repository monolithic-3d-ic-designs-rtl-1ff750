// tb_dnn_cgs64: end-to-end test of dnn_top in the 64x64-block configuration
// (coarse blocks, fewer and wider block multiplexers). Reduced to 512-neuron
// hidden layers so that one 64-wide block is kept per block row (1/8), with
// 16 MAC lanes, i.e. four MAC groups per block row; 100 inputs, 900 outputs.
// Same frames, reference model and mechanism counts as tb_dnn_top.
module tb_dnn_cgs64;
  import dnn_pkg::*;
  localparam int N = 512, N_IN = 100, N_OUT = 900, BS = 64, MACS = 16, L = 5;
  localparam int KEEP = N / BS / 8;
  localparam int WATCHDOG = 200000;
  `include "tb_dnn_body.svh"

  initial begin
    @all_done;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dnn_top #(.N(N), .N_IN(N_IN), .N_OUT(N_OUT), .BS(BS), .KEEP(KEEP), .MACS(MACS),
            .NUM_LAYERS(L)) dut (.*);
endmodule
