// dnn_ctrl: the finite state machine that runs the network one layer at a time.
//
// For each of the NUM_LAYERS weight layers (input->H1, H1->H2, H2->H3, H3->H4,
// H4->output) the controller walks the block rows of the compressed weight
// matrix. A block row covers BS output neurons; the MACS lanes take MACS of
// them at a time (BS/MACS groups per block row). For every group it steps the
// neuron counter k over the KEEP*BS selected input neurons, one per cycle,
// reading one weight row per cycle. The weight row address is therefore
//   layer * ROWS_PER_LAYER + (block_row * GROUPS + group) * KSEL + k
// so the compressed weights of a 1024-output layer fill exactly one
// 8192-row bank and the 2048-row output layer fills two. The coefficient
// entry of the block row is addressed as layer * N/BS + block_row.
// The coefficient register file (coef_regfile) sits inside the controller, as
// in the published architecture; the host loads it through `coef_we`,
// `coef_waddr` and `coef_wdata`, and the entry of the current block row drives
// the neuron select unit through `coef_rdata`.
//
// Timing: stage 0 issues the SRAM read and neuron index; stage 1 (one cycle
// later) is the MAC cycle (`mac_en`, `mac_first` at k = 0); stage 2 writes
// the MACS finished sums, through ReLU/requantisation, to the output
// registers (`out_we`, `out_base`, `relu_en`). Consecutive groups and block
// rows stream back to back with no bubbles. After a layer's last issue two
// drain cycles let the pipeline empty, then one `swap` cycle copies the
// outputs to the input registers; after the last layer `done` pulses for
// one cycle. A run of the full network takes
//   sum(rows of each layer) + 3 * (NUM_LAYERS - 1) + 3
// cycles from the cycle in which `start` is accepted to the `done` pulse.
// The one-layer-at-a-time schedule and the allocation of the 16 MAC units
// follow the design description; the pipeline and its timing are this
// design's own.
module dnn_ctrl
  import dnn_pkg::*;
#(
  parameter int unsigned N          = 1024,
  parameter int unsigned BS         = 16,
  parameter int unsigned KEEP       = 8,
  parameter int unsigned MACS       = 16,
  parameter int unsigned NUM_LAYERS = 5,
  localparam int unsigned KSEL      = KEEP * BS,
  localparam int unsigned GROUPS    = BS / MACS,
  localparam int unsigned BROWS     = N / BS,          // block rows of a 1024-output layer
  localparam int unsigned ROWS_PER_LAYER = BROWS * GROUPS * KSEL,
  localparam int unsigned TOTAL_ROWS = (NUM_LAYERS + 1) * ROWS_PER_LAYER,
  localparam int unsigned AW        = $clog2(TOTAL_ROWS),
  localparam int unsigned CE        = (NUM_LAYERS + 1) * BROWS,
  localparam int unsigned CW        = $clog2(CE),
  localparam int unsigned SELW      = $clog2(BROWS),
  localparam int unsigned KW        = $clog2(KSEL),
  localparam int unsigned OW        = $clog2(2 * N),
  localparam int unsigned LW        = $clog2(NUM_LAYERS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [LW-1:0] layer,
  // stage 0: weight read, coefficient entry, neuron index
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic [CW-1:0] coef_addr,
  output logic [KEEP*SELW-1:0] coef_rdata,
  output logic [KW-1:0] k,
  // stage 1: MAC control
  output logic          mac_en,
  output logic          mac_first,
  // stage 2: result write
  output logic          out_we,
  output logic [OW-1:0] out_base,
  output logic          relu_en,
  // layer change
  output logic          swap,
  // host load of the coefficient register file
  input  logic          coef_we,
  input  logic [CW-1:0] coef_waddr,
  input  logic [KEEP*SELW-1:0] coef_wdata
);
  ctrl_state_e state;
  // `start` is ignored while a run is in progress.
  logic [OW-1:0] brow;           // block row within the layer
  logic [OW-1:0] grp;            // MAC group within the block row
  logic [1:0]    drain_cnt;

  // stage 1 and 2 pipeline registers
  logic          v1, first1, last1, relu1;
  logic [OW-1:0] obase1;
  logic          v2, last2, relu2;
  logic [OW-1:0] obase2;

  logic          is_last_layer, last_k, last_grp, last_brow;
  logic [OW-1:0] brows_this;

  always_comb begin
    is_last_layer = (layer == LW'(NUM_LAYERS - 1));
    brows_this    = is_last_layer ? OW'(2 * BROWS) : OW'(BROWS);
    last_k        = (k == KW'(KSEL - 1));
    last_grp      = (grp == OW'(GROUPS - 1));
    last_brow     = (brow == brows_this - 1'b1);
    rd_en         = (state == ST_RUN);
    rd_addr       = AW'(layer) * AW'(ROWS_PER_LAYER)
                  + (AW'(brow) * AW'(GROUPS) + AW'(grp)) * AW'(KSEL) + AW'(k);
    coef_addr     = CW'(layer) * CW'(BROWS) + CW'(brow);
    busy          = (state != ST_IDLE);
    done          = (state == ST_DONE);
    swap          = (state == ST_SWAP);
    mac_en        = v1;
    mac_first     = first1;
    out_we        = v2 && last2;
    out_base      = obase2;
    relu_en       = relu2;
  end

  coef_regfile #(.ENTRIES(CE), .KEEP(KEEP), .SELW(SELW)) u_coef (
    .clk, .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata),
    .raddr(coef_addr), .rdata(coef_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      layer     <= '0;
      brow      <= '0;
      grp       <= '0;
      k         <= '0;
      drain_cnt <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_RUN;
          layer <= '0;
          brow  <= '0;
          grp   <= '0;
          k     <= '0;
        end
        ST_RUN: begin
          k <= last_k ? '0 : k + 1'b1;
          if (last_k) begin
            grp <= last_grp ? '0 : grp + 1'b1;
            if (last_grp) begin
              brow <= last_brow ? '0 : brow + 1'b1;
              if (last_brow) begin
                state     <= ST_DRAIN;
                drain_cnt <= '0;
              end
            end
          end
        end
        ST_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 2'd1) state <= is_last_layer ? ST_DONE : ST_SWAP;
        end
        ST_SWAP: begin
          layer <= layer + 1'b1;
          state <= ST_RUN;
        end
        ST_DONE: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; relu1 <= 1'b0; obase1 <= '0;
      v2 <= 1'b0; last2  <= 1'b0; relu2 <= 1'b0; obase2 <= '0;
    end else begin
      v1     <= rd_en;
      first1 <= (k == '0);
      last1  <= last_k;
      relu1  <= !is_last_layer;
      obase1 <= brow * OW'(BS) + grp * OW'(MACS);
      v2     <= v1;
      last2  <= last1;
      relu2  <= relu1;
      obase2 <= obase1;
    end
  end

endmodule
