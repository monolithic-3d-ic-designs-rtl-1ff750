// Shared body of the end-to-end testbenches of dnn_top. The including module
// defines N, N_IN, N_OUT, BS, MACS, L, KEEP and WATCHDOG, and instantiates
// dnn_top as `dut` with these sizes (by name-matched ports); it prints the
// result line and finishes when `all_done` fires.
  localparam int KSEL   = KEEP * BS;
  localparam int GROUPS = BS / MACS;
  localparam int BROWS  = N / BS;
  localparam int ROWS   = BROWS * GROUPS * KSEL;   // rows per bank / layer
  localparam int NBANKS = L + 1;
  localparam int TROWS  = NBANKS * ROWS;
  localparam int SELW   = $clog2(BROWS);
  localparam int CE     = NBANKS * BROWS;
  localparam int CW     = $clog2(CE);
  localparam int WAW    = $clog2(TROWS);
  localparam int OW     = $clog2(2 * N);
  localparam int QS     = (KSEL >= 128) ? 10 : 8;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [$clog2(L + 1)-1:0] layer;
  logic [SHW-1:0] qshift [L];
  logic in_clear = 0, in_we = 0;
  logic [$clog2(N)-1:0] in_addr = '0;
  neuron_t in_data = '0;
  logic coef_we = 0;
  logic [CW-1:0] coef_addr = '0;
  logic [KEEP*SELW-1:0] coef_wdata = '0;
  logic w_valid = 0, w_ready;
  logic [WAW-1:0] w_addr = '0;
  logic [MACS*WW-1:0] w_data = '0;
  logic [OW-1:0] out_addr = '0;
  neuron_t out_data;

  int checks = 0, failures = 0;
  event all_done;
  int n_swap = 0, n_group2 = 0, n_relu = 0, n_sat = 0, n_negout = 0;
  int n_wstall = 0, n_wbusy = 0;

  // model state
  int  coef_m [CE][KEEP];
  byte wm [TROWS][MACS];
  byte x_in [N];
  byte y_ref [2 * N];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters observed on the design
  always @(posedge clk) if (rst_n) begin
    if (dut.swap) n_swap++;
    if (dut.out_we && dut.u_ctrl.obase2 % BS != 0) n_group2++;
    if (w_valid && !w_ready) n_wstall++;
    if (w_valid && w_ready && busy) n_wbusy++;
  end

  function automatic byte requant(longint acc, int sh, bit relu);
    longint v = acc >>> sh;
    if (relu && v < 0) begin v = 0; n_relu++; end
    if (v > 127) begin v = 127; n_sat++; end
    if (v < -128) begin v = -128; n_sat++; end
    return byte'(v);
  endfunction

  // Reference: the block-sparse network evaluated layer by layer.
  task automatic reference();
    byte x [N];
    for (int i = 0; i < N; i++) x[i] = x_in[i];
    for (int l = 0; l < L; l++) begin
      int nout = (l == L - 1) ? 2 * N : N;
      for (int o = 0; o < nout; o++) begin
        longint acc = 0;
        int br = o / BS, g = (o % BS) / MACS, m = o % MACS;
        for (int j = 0; j < KEEP; j++)
          for (int t = 0; t < BS; t++) begin
            int col = coef_m[l * BROWS + br][j] * BS + t;
            int row = l * ROWS + (br * GROUPS + g) * KSEL + j * BS + t;
            acc += longint'(wm[row][m]) * longint'(x[col]);
          end
        y_ref[o] = requant(acc, QS, l != L - 1);
      end
      if (l != L - 1) for (int i = 0; i < N; i++) x[i] = y_ref[i];
    end
  endtask

  task automatic write_row(int r);
    w_valid = 1;
    w_addr = WAW'(r);
    for (int m = 0; m < MACS; m++) w_data[m*WW +: WW] = wm[r][m];
    #1;
    while (!w_ready) begin   // w_ready is stable from here to the next edge
      @(negedge clk);
      #1;
    end
    @(negedge clk);          // accepted at the edge in between
    w_valid = 0;
  endtask

  task automatic load_inputs();
    in_clear = 1;
    @(negedge clk);
    in_clear = 0;
    for (int i = 0; i < N; i++) x_in[i] = 0;
    for (int i = 0; i < N_IN; i++) begin
      x_in[i] = byte'($urandom);
      in_we = 1; in_addr = $clog2(N)'(i); in_data = x_in[i];
      @(negedge clk);
    end
    in_we = 0;
  endtask

  task automatic run_frame(int frame, bit update_layer0);
    int cycles = 0;
    int exp_cycles = (L - 1) * ROWS + 2 * ROWS + 3 * (L - 1) + 3;
    reference();   // results of the weights in place at the start
    start = 1;
    @(negedge clk);
    start = 0;
    fork
      begin
        while (!done) begin
          if (busy) cycles++;
          @(negedge clk);
        end
        cycles++;   // the done cycle
      end
      if (update_layer0) begin
        // weight update of pseudo-training: new layer-0 weights (bank 0)
        for (int r = 0; r < ROWS; r++) begin
          for (int m = 0; m < MACS; m++) wm[r][m] = byte'($urandom);
          write_row(r);
        end
      end
    join
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("frame %0d: %0d cycles, expected %0d", frame, cycles, exp_cycles);
    end
    for (int o = 0; o < N_OUT; o++) begin
      out_addr = OW'(o);
      #1;
      checks++;
      if (out_data < 0) n_negout++;
      if (out_data !== y_ref[o]) begin
        failures++;
        if (failures < 10) $display("frame %0d output %0d: %0d expected %0d", frame, o, out_data, y_ref[o]);
      end
    end
    $display("frame %0d: %0d cycles", frame, cycles);
    @(negedge clk);
  endtask

  initial begin
    for (int l = 0; l < L; l++) qshift[l] = SHW'(QS);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // CGS coefficients: KEEP distinct kept blocks per block row
    for (int e = 0; e < CE; e++) begin
      automatic int used [int];
      for (int j = 0; j < KEEP; j++) begin
        automatic int c;
        do c = $urandom % BROWS; while (used.exists(c));
        used[c] = 1;
        coef_m[e][j] = c;
        coef_wdata[j*SELW +: SELW] = SELW'(c);
      end
      coef_we = 1; coef_addr = CW'(e);
      @(negedge clk);
    end
    coef_we = 0;
    // weights of all banks
    for (int r = 0; r < TROWS; r++) begin
      for (int m = 0; m < MACS; m++) wm[r][m] = byte'($urandom);
      write_row(r);
    end
    load_inputs();
    run_frame(1, 0);
    load_inputs();
    run_frame(2, 1);
    load_inputs();   // the input registers now hold hidden-layer values
    run_frame(3, 0);

    // every mechanism must have happened
    checks += 7;
    if (n_swap != 3 * (L - 1)) begin failures++; $display("layer swaps %0d", n_swap); end
    if (GROUPS > 1 && n_group2 == 0) begin failures++; $display("no second MAC group"); end
    if (n_relu == 0) begin failures++; $display("ReLU never clamped"); end
    if (n_sat == 0) begin failures++; $display("no saturation"); end
    if (n_negout == 0) begin failures++; $display("no negative output score"); end
    if (n_wstall == 0) begin failures++; $display("no blocked weight write"); end
    if (n_wbusy == 0) begin failures++; $display("no weight write during a run"); end
    $display("mechanisms: swaps=%0d second-group writes=%0d relu=%0d saturations=%0d negative outputs=%0d blocked writes=%0d writes during run=%0d",
             n_swap, n_group2, n_relu, n_sat, n_negout, n_wstall, n_wbusy);
    -> all_done;   // the including module reports and finishes
  end
