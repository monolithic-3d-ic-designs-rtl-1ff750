// weight_memory: the six weight SRAM banks behind one read and one write port.
//
// The banks form one flat row address space: bank = addr / ROWS, row within
// the bank = addr % ROWS. Banks 0-3 hold the four 1024-output layers (input
// to hidden 1, hidden 1-2, 2-3, 3-4) and banks 4-5 the output layer, which
// has about twice as many outputs. The compute pipeline reads one row per
// cycle (`rd_en`, data on `rd_data` one cycle later). The write port is used
// to load weights and, during pseudo-training, to write updated weights
// while classification runs: each bank is single-ported, so a write is
// accepted (`w_ready`) only when its bank is not being read in that cycle;
// writes to the other five banks proceed in parallel with the reads.
// Bank count, row width and depth follow the design description; the flat
// addressing and the read-priority rule are this design's own.
module weight_memory #(
  parameter int unsigned NUM_BANKS = 6,
  parameter int unsigned ROWS      = 8192,
  parameter int unsigned WIDTH     = 128,
  localparam int unsigned AW       = $clog2(NUM_BANKS * ROWS),
  localparam int unsigned RW       = $clog2(ROWS),
  localparam int unsigned BW       = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // read port (compute pipeline)
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  // write port (weight load / update), valid-ready
  input  logic             w_valid,
  output logic             w_ready,
  input  logic [AW-1:0]    w_addr,
  input  logic [WIDTH-1:0] w_data
);
  logic [BW-1:0]    rd_bank, w_bank, rd_bank_q;
  logic [RW-1:0]    rd_row, w_row;
  logic [WIDTH-1:0] bank_rdata [NUM_BANKS];

  always_comb begin
    rd_bank = BW'(rd_addr / AW'(ROWS));
    rd_row  = RW'(rd_addr % AW'(ROWS));
    w_bank  = BW'(w_addr / AW'(ROWS));
    w_row   = RW'(w_addr % AW'(ROWS));
    w_ready = !(rd_en && (rd_bank == w_bank));
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic rd_sel, wr_sel;
    always_comb begin
      rd_sel = rd_en && (rd_bank == BW'(b));
      wr_sel = w_valid && w_ready && (w_bank == BW'(b));
    end
    sram_bank #(.WIDTH(WIDTH), .DEPTH(ROWS)) u_bank (
      .clk  (clk),
      .ce   (rd_sel || wr_sel),
      .we   (wr_sel),
      .addr (wr_sel ? w_row : rd_row),
      .wdata(w_data),
      .rdata(bank_rdata[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_bank_q <= '0;
    else if (rd_en) rd_bank_q <= rd_bank;
  end

  always_comb rd_data = bank_rdata[rd_bank_q];

  // A read and a write never hit the same bank in one cycle.
  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_en && w_valid && w_ready && rd_bank == w_bank));
endmodule
