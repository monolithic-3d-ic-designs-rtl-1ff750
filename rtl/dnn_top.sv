// dnn_top: coarse-grain-sparse DNN accelerator for speech recognition.
//
// The network is 440 inputs (11 frames x 40 fMLLR features), four hidden
// layers of 1024 ReLU neurons and 1,947 outputs (HMM state scores). Every
// weight matrix is pruned block-wise (coarse-grain sparsification, CGS): it is
// cut into BS x BS blocks and only 1/8 of the blocks of each block row are
// kept, so each output neuron sees only KEEP*BS = 128 of the 1024 inputs.
// The chip computes one layer at a time with 16 MAC lanes in parallel:
//   - dnn_ctrl (FSM) walks block rows, MAC groups and the 128 selected inputs;
//   - coef_regfile, inside the FSM, holds per block row which blocks were kept;
//   - neuron_select uses those indices to pick the inputs (eight block muxes);
//   - weight_memory (six 128-bit x 8192-row SRAM banks) delivers one row of
//     16 weights per cycle, one weight per lane;
//   - mac_unit x 16 accumulate, relu_quant x 16 apply ReLU and requantise;
//   - neuron_regs hold input and output neurons and pass outputs on.
// The 1,947 outputs are padded to 2048 (128 block rows; the padding rows carry
// weights of zero or anything the host chooses and are simply not read).
// Inputs beyond the 440 features must be zero (use `in_clear` before loading).
//
// Host interface: load coefficients (`coef_*`), weights (`w_*`, valid-ready)
// and the input features (`in_*`), set the per-layer requantisation shifts
// `qshift`, pulse `start`, wait for `done`, read scores on `out_addr`/
// `out_data`. Weights may be written while a run is in progress (weight update
// during pseudo-training); a write to the bank being read waits (w_ready low).
// One frame takes sum(rows of each layer) + 3*(NUM_LAYERS-1) + 3 cycles:
// 49,167 cycles at the default sizes, about 123 us at 400 MHz.
// Structure, sizes and the CGS scheme follow the design description; word
// widths, requantisation, the pipeline and the host interface are this
// design's own.
module dnn_top
  import dnn_pkg::*;
#(
  parameter int unsigned N          = 1024,          // neurons per hidden layer
  parameter int unsigned N_IN       = 440,           // input features
  parameter int unsigned N_OUT      = 1947,          // output (HMM state) scores
  parameter int unsigned BS         = 16,            // CGS block size
  parameter int unsigned KEEP       = N / BS / 8,    // blocks kept per block row (12.5 %)
  parameter int unsigned MACS       = 16,            // parallel MAC lanes
  parameter int unsigned NUM_LAYERS = 5,             // weight layers
  localparam int unsigned NBANKS    = NUM_LAYERS + 1,
  localparam int unsigned KSEL      = KEEP * BS,
  localparam int unsigned ROWS      = (N / BS) * (BS / MACS) * KSEL,
  localparam int unsigned SELW      = $clog2(N / BS),
  localparam int unsigned CE        = NBANKS * (N / BS),
  localparam int unsigned CW        = $clog2(CE),
  localparam int unsigned WAW       = $clog2(NBANKS * ROWS),
  localparam int unsigned IW        = $clog2(N),
  localparam int unsigned OW        = $clog2(2 * N),
  localparam int unsigned LW        = $clog2(NUM_LAYERS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // run control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [LW-1:0]        layer,
  input  logic [SHW-1:0]       qshift [NUM_LAYERS],
  // input feature load
  input  logic                 in_clear,
  input  logic                 in_we,
  input  logic [IW-1:0]        in_addr,
  input  neuron_t              in_data,
  // CGS coefficient load
  input  logic                 coef_we,
  input  logic [CW-1:0]        coef_addr,
  input  logic [KEEP*SELW-1:0] coef_wdata,
  // weight load / update
  input  logic                 w_valid,
  output logic                 w_ready,
  input  logic [WAW-1:0]       w_addr,
  input  logic [MACS*WW-1:0]   w_data,
  // output scores to the HMM decoder
  input  logic [OW-1:0]        out_addr,
  output neuron_t              out_data
);
  logic                 rd_en, mac_en, mac_first, out_we, relu_en, swap;
  logic [WAW-1:0]       rd_addr;
  logic [CW-1:0]        coef_raddr;
  logic [KEEP*SELW-1:0] coef_rdata;
  logic [$clog2(KSEL)-1:0] k;
  logic [OW-1:0]        out_base;
  logic [MACS*WW-1:0]   w_row;
  neuron_t              a [N];
  neuron_t              sel_neuron, neuron_q;
  neuron_t              selected [KSEL];
  neuron_t              lane_y [MACS];
  acc_t                 lane_acc [MACS];
  logic [SHW-1:0]       shift_q;

  dnn_ctrl #(.N(N), .BS(BS), .KEEP(KEEP), .MACS(MACS), .NUM_LAYERS(NUM_LAYERS)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .layer,
    .rd_en, .rd_addr, .coef_addr(coef_raddr), .coef_rdata, .k,
    .mac_en, .mac_first, .out_we, .out_base, .relu_en, .swap,
    .coef_we, .coef_waddr(coef_addr), .coef_wdata
  );

  weight_memory #(.NUM_BANKS(NBANKS), .ROWS(ROWS), .WIDTH(MACS*WW)) u_wmem (
    .clk, .rst_n, .rd_en, .rd_addr, .rd_data(w_row),
    .w_valid, .w_ready, .w_addr, .w_data
  );

  neuron_regs #(.N(N), .NOUT(2 * N), .MACS(MACS)) u_nregs (
    .clk, .rst_n, .in_clear, .in_we, .in_addr, .in_data,
    .out_we, .out_base, .out_data(lane_y), .swap,
    .rd_addr(out_addr), .rd_data(out_data), .a
  );

  neuron_select #(.N(N), .BS(BS), .KEEP(KEEP)) u_nsel (
    .a, .sel(coef_rdata), .k, .selected, .neuron(sel_neuron)
  );

  // Stage 0 -> 1: the selected neuron travels alongside the SRAM read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) neuron_q <= '0;
    else        neuron_q <= sel_neuron;
  end

  // Shift of the layer whose results are written (stage 2 lags the layer
  // counter by at most the drain, during which the layer does not change).
  always_comb shift_q = qshift[layer];

  for (genvar m = 0; m < MACS; m++) begin : g_lane
    mac_unit u_mac (
      .clk, .rst_n, .en(mac_en), .first(mac_first),
      .weight(weight_t'(w_row[m*WW +: WW])), .neuron(neuron_q),
      .acc(lane_acc[m])
    );
    relu_quant u_act (
      .acc(lane_acc[m]), .shift(shift_q), .relu_en(relu_en), .y(lane_y[m])
    );
  end

  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_we |-> int'(in_addr) < N_IN);
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (in_we || in_clear || coef_we) |-> !busy);
  a_out_range: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> N_OUT <= 2 * N);
endmodule
