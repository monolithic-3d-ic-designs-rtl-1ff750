// tb_neuron_select: self-checking test of the neuron select unit at full size
// (1024 neurons, 16-neuron blocks, 8 block multiplexers). For random input
// neurons and random block selections it checks every one of the 128 selected
// neurons, through both the `selected` vector and the per-cycle `neuron` output.
module tb_neuron_select;
  import dnn_pkg::*;
  localparam int N = 1024, BS = 16, KEEP = 8, SELW = 6, KSEL = KEEP * BS;
  neuron_t a [N];
  logic [KEEP*SELW-1:0] sel;
  logic [$clog2(KSEL)-1:0] k;
  neuron_t selected [KSEL];
  neuron_t neuron;
  int checks = 0, failures = 0;

  neuron_select #(.N(N), .BS(BS), .KEEP(KEEP)) dut (.*);

  initial begin
    for (int trial = 0; trial < 20; trial++) begin
      int blk [KEEP];
      for (int i = 0; i < N; i++) a[i] = neuron_t'($urandom);
      for (int j = 0; j < KEEP; j++) begin
        blk[j] = (trial == 0) ? 63 - j : $urandom % (N / BS);
        sel[j*SELW +: SELW] = SELW'(blk[j]);
      end
      for (int kk = 0; kk < KSEL; kk++) begin
        neuron_t expv;
        k = 7'(kk);
        #1;
        expv = a[blk[kk / BS] * BS + kk % BS];
        checks += 2;
        if (neuron !== expv) begin
          failures++;
          $display("trial %0d k %0d: neuron %0d expected %0d", trial, kk, neuron, expv);
        end
        if (selected[kk] !== expv) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
