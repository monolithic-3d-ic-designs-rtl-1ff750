// relu_quant: activation and requantisation of one finished MAC sum.
//
// The 24-bit accumulator is shifted right arithmetically by `shift` (the
// fixed-point scale of the layer), then, for hidden layers (`relu_en` high),
// negative results become zero (ReLU), and finally the value saturates to
// the signed 8-bit neuron range. The output layer runs with `relu_en` low and
// keeps signed scores for the HMM decoder. Purely combinational.
// ReLU at the end of each hidden layer is the design description's; the
// shift-and-saturate requantisation is this design's own choice.
module relu_quant
  import dnn_pkg::*;
(
  input  acc_t             acc,
  input  logic [SHW-1:0]   shift,
  input  logic             relu_en,
  output neuron_t          y
);
  acc_t shifted;
  localparam acc_t MAXV = acc_t'(2**(NW-1) - 1);
  localparam acc_t MINV = -acc_t'(2**(NW-1));

  always_comb begin
    shifted = acc >>> shift;
    if (relu_en && shifted < 0) y = '0;
    else if (shifted > MAXV)    y = neuron_t'(MAXV);
    else if (shifted < MINV)    y = neuron_t'(MINV);
    else                        y = neuron_t'(shifted);
  end
endmodule
