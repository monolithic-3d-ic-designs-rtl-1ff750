// mac_unit: one multiply-and-accumulate lane of the accelerator.
//
// Each cycle with `en` high the lane multiplies one signed 8-bit weight by one
// signed 8-bit neuron. With `first` high the product replaces the accumulator
// (start of a new output neuron), otherwise it is added to it. The sum is
// registered, so `acc` shows a product one cycle after it was presented.
// Sixteen of these lanes run in parallel, each owning one output neuron of
// the current group, and all share the same input neuron. The lane count
// follows the design description; the widths and the load-on-first scheme
// are this design's own.
module mac_unit
  import dnn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,      // a valid weight/neuron pair is present
  input  logic    first,   // first term of a new sum: load instead of add
  input  weight_t weight,
  input  neuron_t neuron,
  output acc_t    acc
);
  acc_t prod;

  always_comb prod = acc_t'(weight) * acc_t'(neuron);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (en)    acc <= first ? prod : acc + prod;
  end
endmodule
