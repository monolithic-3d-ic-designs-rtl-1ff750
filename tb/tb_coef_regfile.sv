// tb_coef_regfile: self-checking test of the CGS coefficient register file.
// Fills every entry of a full-size file (384 entries of 8 x 6 bits), then
// mixes random rewrites with combinational reads, comparing with a model.
module tb_coef_regfile;
  localparam int E = 384, KEEP = 8, SELW = 6, EW = KEEP * SELW;
  logic clk = 0, we = 0;
  logic [$clog2(E)-1:0] waddr = '0, raddr = '0;
  logic [EW-1:0] wdata = '0, rdata, model [E];
  int checks = 0, failures = 0;

  coef_regfile #(.ENTRIES(E), .KEEP(KEEP), .SELW(SELW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < E; i++) begin
      we = 1; waddr = 9'(i); wdata = {$urandom, $urandom};
      model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic int r = $urandom % E;
      we = 1'($urandom);
      waddr = 9'($urandom % E);
      wdata = {$urandom, $urandom};
      raddr = 9'(r);
      #1;
      checks++;
      if (rdata !== model[r]) begin
        failures++;
        $display("read mismatch entry %0d", r);
      end
      if (we) model[waddr] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
