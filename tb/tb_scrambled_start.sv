// tb_scrambled_start -- the two-phase start-up from scrambled initial phases.
//
// Before a configuration is loaded, the testbench holds each node's DCO code at a
// different value for 100 us (forcing the filter output), so that the sixteen clocks
// drift apart, and then releases them. From such arbitrary initial phases a fully
// coupled network may settle with fixed non-zero phase offsets between neighbours; the
// two-phase start-up is meant to avoid that.
//   A. Wide scramble (codes 598..998, clocks up to 16 us apart), all links on from the
//      start (Kp = 1, Ki = 1/16), RUNS_A times. After 40 ms the state is classified: an
//      undesired stable state is one where every node's error sum stays within +/-4
//      (the node keeps its frequency) while some link error is 4 or more (neighbours
//      locked with a fixed phase offset). At least one must be seen.
//   B. Moderate scramble (codes 698..898, up to 8 us apart), two-phase start-up,
//      RUNS_B times: one-way configuration (upper and left links only); after 30 ms
//      every active link error must be within +/-2 steps and every node clock within
//      1.5 us of the reference (in phase, not only in frequency); then all links, and
//      the same check over the following 10 ms.
// The reference runs at 19.84 us (DCO code 808). With scrambles as wide as in A, the
// one-way mode can itself be held by a node whose two detectors read +15 and -15 (one of
// them pairing the wrong edges); B therefore uses the moderate scramble.
module tb_scrambled_start;
  import adpll_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam realtime T_REF = 19840ns;
  localparam int RUNS_A = 3;
  localparam int RUNS_B = 3;
  logic clk_tdc = 0, clk_dco = 0, rst_n = 0, f_ref = 0;
  logic cfg_sdi = 0, cfg_shift = 0, cfg_load = 0, cfg_sdo;
  logic node_clk [NODES];
  logic node_div [NODES];
  logic [NC-1:0] node_code [NODES];
  sum_t node_total_err [NODES];
  logic signed [ERR_W+KW_W:0] node_werr [NODES][N_IN];
  int checks = 0, failures = 0, n_ref = 0;
  realtime t_ref_edge;
  logic [NC-1:0] scramble [NODES];
  bit hold = 0;

  adpll_network dut (.*);

  always #(149.88ns / 2) clk_tdc = ~clk_tdc;
  always #8ns clk_dco = ~clk_dco;

  initial begin
    #5us;
    forever begin
      f_ref = 1; t_ref_edge = $realtime; n_ref++;
      #(T_REF / 2); f_ref = 0; #(T_REF / 2);
    end
  end

  initial begin
    #500ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hold the DCO codes of all nodes at the scramble values while `hold` is set
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      always @(hold) begin
        if (hold) force dut.g_row[r].g_col[c].u_cell.u_fo.code = scramble[r*COLS+c];
        else      release dut.g_row[r].g_col[c].u_cell.u_fo.code;
      end
    end
  end

  // largest skew of any node clock against the reference edge, over a window
  realtime max_skew;
  bit track = 0;
  for (genvar n = 0; n < NODES; n++) begin : g_skew
    always @(posedge node_div[n]) begin
      realtime s;
      s = $realtime - t_ref_edge;
      if (s > T_REF / 2) s = s - T_REF;
      if (s < 0) s = -s;
      if (track && s > max_skew) max_skew = s;
    end
  end

  task automatic load_config(input bit bi);
    logic [NODES*CFG_W-1:0] word;
    for (int n = 0; n < NODES; n++) begin
      node_cfg_t c;
      c = '0;
      c.kp = gain_t'(256);
      c.ki = gain_t'(16);
      c.kw[IN_LEFT]   = weight_t'((n % COLS > 0 || n == 0) ? 1 : 0);
      c.kw[IN_TOP]    = weight_t'((n / COLS > 0) ? 1 : 0);
      c.kw[IN_RIGHT]  = weight_t'((bi && n % COLS < COLS - 1) ? 1 : 0);
      c.kw[IN_BOTTOM] = weight_t'((bi && n / COLS < ROWS - 1) ? 1 : 0);
      word[n*CFG_W +: CFG_W] = c;
    end
    for (int b = NODES * CFG_W - 1; b >= 0; b--) begin
      @(negedge clk_tdc);
      cfg_sdi = word[b]; cfg_shift = 1;
    end
    @(negedge clk_tdc);
    cfg_shift = 0; cfg_load = 1;
    @(negedge clk_tdc);
    cfg_load = 0;
  endtask

  int worst, worst_sum;

  task automatic observe(input int periods);
    int stop_at;
    worst = 0; worst_sum = 0; max_skew = 0; track = 1;
    stop_at = n_ref + periods;
    while (n_ref < stop_at) begin
      @(posedge clk_tdc);
      for (int n = 0; n < NODES; n++)
        for (int i = 0; i < N_IN; i++) begin
          int e;
          e = node_werr[n][i];
          if (e < 0) e = -e;
          if (e > worst) worst = e;
        end
      for (int n = 0; n < NODES; n++) begin
        int t;
        t = node_total_err[n];
        if (t < 0) t = -t;
        if (t > worst_sum) worst_sum = t;
      end
    end
    track = 0;
  endtask

  task automatic check_locked(input string what, input int periods);
    observe(periods);
    $display("  %s: largest |link error| %0d, largest skew to reference %0.1f ns", what, worst, max_skew);
    checks++;
    if (worst > 2 || max_skew > 1500) begin failures++; $display("FAIL %s not locked in phase", what); end
  endtask

  task automatic scrambled_reset();
    rst_n = 0;
    #1us rst_n = 1;
    hold = 1;
    #100us;
    hold = 0;
  endtask

  int n_undesired = 0;

  task automatic make_scramble(input int spread);
    for (int n = 0; n < NODES; n++) begin
      int d;
      d = $urandom_range(0, 2 * spread);
      scramble[n] = NC'(798 - spread + d);
    end
  endtask

  initial begin
    // A. all links from the start, wide scramble
    for (int run = 0; run < RUNS_A; run++) begin
      make_scramble(200);
      $display("A%0d: initial DCO codes %p", run, scramble);
      scrambled_reset();
      load_config(1);
      #40ms;
      observe(100);
      $display("  all links at once: largest |link error| %0d, largest |error sum| %0d, largest skew %0.1f ns",
               worst, worst_sum, max_skew);
      if (worst_sum <= 4 && worst >= 4) begin
        n_undesired++;
        $display("  -> undesired stable state: equal frequencies, fixed phase offsets");
      end
    end
    // B. two-phase start-up, moderate scramble
    for (int run = 0; run < RUNS_B; run++) begin
      make_scramble(100);
      $display("B%0d: initial DCO codes %p", run, scramble);
      scrambled_reset();
      load_config(0);
      #30ms;
      check_locked("one-way", 100);
      load_config(1);
      #8ms;
      check_locked("all links", 100);
    end
    checks++;
    if (n_undesired == 0) begin failures++; $display("FAIL no undesired stable state seen with all links at once"); end
    $display("undesired stable states with all links at once: %0d of %0d", n_undesired, RUNS_A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
