// tb_weight_memory: self-checking test of the banked weight memory.
// Reduced size (3 banks of 16 rows, 32-bit rows). Loads every row through the
// write port, then runs random cycles of back-to-back reads and writes: checks
// the read data one cycle after each read, while the next read address is
// already applied; that `w_ready` is low exactly when the write targets the
// bank being read; and that blocked writes leave the memory unchanged.
module tb_weight_memory;
  localparam int NB = 3, R = 16, W = 32, AW = $clog2(NB * R);
  logic clk = 0, rst_n = 0, rd_en = 0, w_valid = 0, w_ready;
  logic [AW-1:0] rd_addr = '0, w_addr = '0;
  logic [W-1:0] rd_data, w_data = '0, model [NB * R];
  int checks = 0, failures = 0, stalls = 0, parallel = 0;
  bit prev_rd = 0;
  logic [W-1:0] prev_exp;

  weight_memory #(.NUM_BANKS(NB), .ROWS(R), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NB * R; i++) begin
      w_valid = 1; w_addr = AW'(i); w_data = $urandom; model[i] = w_data;
      #1; checks++; if (!w_ready) failures++;
      @(negedge clk);
    end
    w_valid = 0;
    for (int c = 0; c < 3000; c++) begin
      automatic int ra = $urandom % (NB * R), wa = $urandom % (NB * R);
      automatic bit exp_ready;
      rd_en = 1'($urandom % 4 != 0);
      rd_addr = AW'(ra);
      w_valid = 1'($urandom);
      if (c % 7 == 0) wa = (ra / R) * R + ($urandom % R); // force same bank
      w_addr = AW'(wa);
      w_data = $urandom;
      #1;
      // the read issued one cycle earlier is visible now, while the next
      // address is already applied (back-to-back reads)
      if (prev_rd) begin
        checks++;
        if (rd_data !== prev_exp) begin
          failures++;
          $display("read mismatch at cycle %0d: %h expected %h", c, rd_data, prev_exp);
        end
      end
      exp_ready = !(rd_en && (ra / R) == (wa / R));
      checks++;
      if (w_ready !== exp_ready) begin failures++; $display("w_ready wrong at cycle %0d", c); end
      if (w_valid && !w_ready) stalls++;
      if (w_valid && w_ready && rd_en) parallel++;
      prev_rd = rd_en;
      if (rd_en) prev_exp = model[ra];
      @(posedge clk);
      if (w_valid && exp_ready) model[wa] = w_data;
      @(negedge clk);
    end
    checks++;
    if (stalls == 0 || parallel == 0) begin failures++; $display("conflict cases not reached"); end
    $display("blocked writes %0d, writes parallel to reads %0d", stalls, parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
