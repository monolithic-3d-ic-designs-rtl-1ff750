// coef_regfile: the CGS connection-coefficient register file of the controller.
//
// Coarse-grain sparsification keeps KEEP of the N/BS weight blocks in each
// block row of a weight matrix. For every block row the file stores which
// ones: KEEP block-column indices of log2(N/BS) bits each (for the 16x16
// configuration 8 x 6 = 48 bits per entry). Entries for all layers are stored
// one after another: 64 block rows for each of the four 1024-output layers and
// 128 for the 2048-row (1,947 used) output layer, 384 entries, 18,432 bits.
// The host writes one entry per cycle through `we`/`waddr`/`wdata`; the
// controller reads one entry combinationally through `raddr`/`rdata`.
// The entry format follows the design description; the write port and the
// flat entry addressing are this design's own. Contents are undefined until
// written, as the coefficients are always loaded before a run.
module coef_regfile #(
  parameter int unsigned ENTRIES = 384,
  parameter int unsigned KEEP    = 8,
  parameter int unsigned SELW    = 6,
  localparam int unsigned EW     = KEEP * SELW,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [EW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [EW-1:0] rdata
);
  logic [EW-1:0] regs [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) regs[waddr] <= wdata;
  end

  always_comb rdata = regs[raddr];
endmodule
