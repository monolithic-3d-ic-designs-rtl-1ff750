// tb_dnn_top: end-to-end test of the sparse DNN accelerator.
// Reduced network: 128-neuron hidden layers, 40 inputs, 200 outputs, 16x16
// CGS blocks with one block kept per block row (1/8), 8 MAC lanes (two
// groups per block row), five weight layers as in the full design.
// The testbench loads random CGS coefficients (distinct kept blocks per
// block row), random weights and random input features, runs frames and
// compares every output score with a reference model of the sparse network
// written directly from the block-sparse matrix definition:
//   y[o] = act( sum over kept blocks j, t of W[o][blk_j*BS+t] * x[blk_j*BS+t] )
// Frame 1 is plain classification. Frame 2 is the weight-update phase of
// pseudo-training: while it runs, the host rewrites all weights of layer 0;
// writes to the bank being read must wait. Frame 3 classifies again and must
// see the new layer-0 weights. The cycle count of each frame is checked, and
// the test counts that each mechanism happened: layer swaps, several MAC
// groups per block row, ReLU clamping, saturation, negative output scores,
// blocked weight writes and weight writes accepted during a run.
module tb_dnn_top;
  import dnn_pkg::*;
  localparam int N = 128, N_IN = 40, N_OUT = 200, BS = 16, MACS = 8, L = 5;
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
