// dnn_pkg: word widths and types shared by the sparse speech-DNN accelerator.
//
// Weights are 8 bits, as the design's 128-bit SRAM row (16 MAC units x 8-bit
// weights) implies. Neurons are also 8-bit two's complement and each MAC unit
// keeps a 24-bit accumulator; both widths are this design's own choice. A
// 128-term sum of 8x8-bit products needs 16+7 = 23 bits, so 24 bits cannot
// overflow for the 128 selected neurons of one block row.
package dnn_pkg;
  localparam int unsigned NW   = 8;   // neuron width
  localparam int unsigned WW   = 8;   // weight width
  localparam int unsigned ACCW = 24;  // accumulator width
  localparam int unsigned SHW  = 5;   // width of the requantisation shift amount

  typedef logic signed [NW-1:0]   neuron_t;
  typedef logic signed [WW-1:0]   weight_t;
  typedef logic signed [ACCW-1:0] acc_t;

  // States of the layer controller.
  typedef enum logic [2:0] {
    ST_IDLE,
    ST_RUN,
    ST_DRAIN,
    ST_SWAP,
    ST_DONE
  } ctrl_state_e;
endpackage
