// tb_sram_bank: self-checking test of one weight SRAM bank.
// Writes random rows to a reduced-depth bank, then reads them back in random
// order, checking the one-cycle read latency and that `rdata` holds while the
// bank is idle (ce low) and during writes.
module tb_sram_bank;
  localparam int W = 128, D = 64;
  logic clk = 0, ce = 0, we = 0;
  logic [$clog2(D)-1:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata, model [D], last;
  int checks = 0, failures = 0;

  sram_bank #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      ce = 1; we = 1; addr = i[5:0];
      wdata = {$urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 500; i++) begin
      automatic int a = $urandom % D;
      automatic int mode = $urandom % 4;
      if (mode == 0) begin          // idle: output holds
        ce = 0; we = 0;
        last = rdata;
        @(negedge clk);
        checks++; if (rdata !== last) failures++;
      end else if (mode == 1) begin // write: output holds, memory updated
        ce = 1; we = 1; addr = a[5:0];
        wdata = {$urandom, $urandom, $urandom, $urandom};
        model[a] = wdata;
        last = rdata;
        @(negedge clk);
        checks++; if (rdata !== last) failures++;
      end else begin                // read
        ce = 1; we = 0; addr = a[5:0];
        @(negedge clk);
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("read mismatch at %0d", a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
