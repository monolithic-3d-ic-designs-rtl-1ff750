// neuron_select: picks the input neurons that meet non-zero weight blocks.
//
// The N input neurons are seen as N/BS blocks of BS neurons. For the current
// block row, KEEP multiplexers (eight in the 16x16 configuration) each pick
// one whole block, selected by one field of the coefficient entry `sel`
// (field j in bits [j*SELW +: SELW]). Together they present KEEP*BS neurons
// (128) to the MAC units: all other input neurons meet pruned, all-zero
// weight blocks and are skipped. The MAC lanes take one of these neurons per
// cycle, so a final KEEP*BS-to-1 multiplexer driven by the neuron counter `k`
// delivers neuron k of the selection (block k / BS, position k % BS) on
// `neuron`. The whole selection is also visible on `selected`.
// Purely combinational. The block multiplexers follow the design
// description; presenting one neuron per cycle is this design's own.
module neuron_select
  import dnn_pkg::*;
#(
  parameter int unsigned N    = 1024,
  parameter int unsigned BS   = 16,
  parameter int unsigned KEEP = 8,
  localparam int unsigned NBLK = N / BS,
  localparam int unsigned SELW = $clog2(NBLK),
  localparam int unsigned KSEL = KEEP * BS,
  localparam int unsigned KW   = $clog2(KSEL)
) (
  input  neuron_t                 a [N],
  input  logic [KEEP*SELW-1:0]    sel,
  input  logic [KW-1:0]           k,
  output neuron_t                 selected [KSEL],
  output neuron_t                 neuron
);
  // KEEP block multiplexers, one BS-neuron block each
  for (genvar j = 0; j < KEEP; j++) begin : g_mux
    logic [SELW-1:0] blk;
    always_comb blk = sel[j*SELW +: SELW];
    for (genvar t = 0; t < BS; t++) begin : g_lane
      always_comb selected[j*BS + t] = a[int'(blk) * BS + t];
    end
  end

  always_comb neuron = selected[k];
endmodule
