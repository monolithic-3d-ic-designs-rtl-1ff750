// sram_bank: one single-port weight SRAM bank.
//
// A row holds one weight for each of the 16 MAC units (16 x 8 = 128 bits) and
// a bank holds 8192 rows, exactly the compressed weights of one 1024-neuron
// layer. One access per cycle: with `ce` and `we` high the row `addr` is
// written with `wdata`; with `ce` high and `we` low it is read and `rdata`
// shows the row on the next cycle (synchronous read, as in an SRAM macro).
// `rdata` holds its value while the bank is idle. Row width and depth follow
// the design description; the port protocol is this design's own. Written as
// an array so that a memory compiler or a synthesis tool can map it to a
// macro.
module sram_bank #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
