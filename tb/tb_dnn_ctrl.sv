// tb_dnn_ctrl: self-checking test of the layer controller.
// Reduced network (128 neurons, 16-neuron blocks, one kept block per block
// row, 8 lanes so each block row takes two MAC groups, 3 layers). A model of
// the nested loop (layer, block row, group, selected neuron) predicts every
// issued weight address, coefficient entry and neuron index; the testbench
// also checks the MAC enable/first timing one cycle later, each result write
// (base, ReLU flag) two cycles after the last term, the layer swaps, the
// `done` pulse and the cycle count of a run. Two runs back to back.
module tb_dnn_ctrl;
  localparam int N = 128, BS = 16, KEEP = 1, MACS = 8, L = 3;
  localparam int KSEL = KEEP * BS, GROUPS = BS / MACS, BROWS = N / BS;
  localparam int RPL = BROWS * GROUPS * KSEL;
  localparam int AW = $clog2((L + 1) * RPL), CW = $clog2((L + 1) * BROWS);
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, rd_en, mac_en, mac_first, out_we, relu_en, swap;
  logic [$clog2(L + 1)-1:0] layer;
  logic [AW-1:0] rd_addr;
  logic [CW-1:0] coef_addr, coef_waddr = '0;
  localparam int SELW = $clog2(BROWS);
  logic [KEEP*SELW-1:0] coef_rdata, coef_wdata = '0;
  logic coef_we = 0;
  logic [$clog2(KSEL)-1:0] k;
  logic [$clog2(2 * N)-1:0] out_base;
  int checks = 0, failures = 0;

  dnn_ctrl #(.N(N), .BS(BS), .KEEP(KEEP), .MACS(MACS), .NUM_LAYERS(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected issue sequence
  int exp_addr [$], exp_coef [$], exp_k [$], exp_base [$], exp_relu [$];
  bit exp_first [$];

  task automatic build_expect();
    exp_addr.delete(); exp_coef.delete(); exp_k.delete(); exp_first.delete();
    exp_base.delete(); exp_relu.delete();
    for (int l = 0; l < L; l++) begin
      int br_n = (l == L - 1) ? 2 * BROWS : BROWS;
      for (int br = 0; br < br_n; br++)
        for (int g = 0; g < GROUPS; g++) begin
          for (int kk = 0; kk < KSEL; kk++) begin
            exp_addr.push_back(l * RPL + (br * GROUPS + g) * KSEL + kk);
            exp_coef.push_back(l * BROWS + br);
            exp_k.push_back(kk);
            exp_first.push_back(kk == 0);
          end
          exp_base.push_back(br * BS + g * MACS);
          exp_relu.push_back(l != L - 1);
        end
    end
  endtask

  bit first_pipe [$];
  int cycles, swaps, writes;

  always @(posedge clk) if (rst_n) begin
    if (mac_en) begin
      checks++;
      if (first_pipe.size() == 0 || mac_first !== first_pipe.pop_front()) begin
        failures++; $display("mac_first wrong");
      end
    end
    if (rd_en) begin
      checks++;
      if (exp_addr.size() == 0 || rd_addr != AW'(exp_addr[0]) || coef_addr != CW'(exp_coef[0])
          || k != 4'(exp_k[0])) begin
        failures++;
        $display("issue mismatch: addr %0d coef %0d k %0d", rd_addr, coef_addr, k);
      end
      if (exp_addr.size() != 0) begin
        first_pipe.push_back(exp_first[0]);
        void'(exp_addr.pop_front()); void'(exp_coef.pop_front());
        void'(exp_k.pop_front()); void'(exp_first.pop_front());
      end
    end
    if (out_we) begin
      writes++;
      checks++;
      if (exp_base.size() == 0 || out_base != 8'(exp_base[0]) || relu_en != 1'(exp_relu[0])) begin
        failures++; $display("write mismatch: base %0d relu %0b", out_base, relu_en);
      end
      if (exp_base.size() != 0) begin void'(exp_base.pop_front()); void'(exp_relu.pop_front()); end
    end
    if (swap) swaps++;
    if (busy) cycles++;
  end

  initial begin
    int exp_cycles, total_rows;
    total_rows = (L - 1) * RPL + 2 * RPL;
    exp_cycles = total_rows + 3 * (L - 1) + 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (busy || done || rd_en) failures++;
    for (int run = 0; run < 2; run++) begin
      build_expect();
      cycles = 0; swaps = 0; writes = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks += 6;
      if (done) begin failures++; $display("done longer than one cycle"); end
      if (busy) failures++;
      if (cycles != exp_cycles) begin failures++; $display("cycles %0d expected %0d", cycles, exp_cycles); end
      if (swaps != L - 1) begin failures++; $display("swaps %0d", swaps); end
      if (writes != total_rows / KSEL) begin failures++; $display("writes %0d", writes); end
      if (exp_addr.size() != 0 || exp_base.size() != 0) begin failures++; $display("missing issues"); end
      $display("run %0d: %0d cycles", run, cycles);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
