// neuron_regs: input- and output-neuron registers of the current layer.
//
// `a` holds the N input neurons of the layer being computed; `b` collects its
// outputs, NOUT of them (twice N, enough for the padded output layer). The
// host loads the 440 acoustic features into `a` through `in_we` (and can clear
// all of `a` with `in_clear` first, so unused inputs are zero). The MAC
// pipeline writes MACS finished outputs at once into b[out_base +: MACS]
// (`out_we`). Between layers, `swap` copies the first N outputs into `a` in
// one cycle, so a hidden layer's outputs become the next layer's inputs.
// After the last layer the host reads `b` through `rd_addr`/`rd_data`.
// Keeping neurons in registers follows the design description; the copy
// between layers is this design's own. All registers reset to zero.
module neuron_regs
  import dnn_pkg::*;
#(
  parameter int unsigned N    = 1024,
  parameter int unsigned NOUT = 2048,
  parameter int unsigned MACS = 16,
  localparam int unsigned AW  = $clog2(N),
  localparam int unsigned OW  = $clog2(NOUT)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host load of the input layer
  input  logic          in_clear,
  input  logic          in_we,
  input  logic [AW-1:0] in_addr,
  input  neuron_t       in_data,
  // results of the MAC lanes
  input  logic          out_we,
  input  logic [OW-1:0] out_base,
  input  neuron_t       out_data [MACS],
  // layer change
  input  logic          swap,
  // host read of the results
  input  logic [OW-1:0] rd_addr,
  output neuron_t       rd_data,
  // input neurons to the neuron select unit
  output neuron_t       a [N]
);
  neuron_t b [NOUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '{default: '0};
    end else if (swap) begin
      for (int i = 0; i < N; i++) a[i] <= b[i];
    end else if (in_clear) begin
      a <= '{default: '0};
    end else if (in_we) begin
      a[in_addr] <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b <= '{default: '0};
    end else if (out_we) begin
      for (int m = 0; m < MACS; m++) b[out_base + OW'(m)] <= out_data[m];
    end
  end

  always_comb rd_data = b[rd_addr];
endmodule
