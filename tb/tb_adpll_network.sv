// tb_adpll_network -- end-to-end run of the 4x4 network at its default parameters: the
// two-phase start-up in which the network first locks in unidirectional mode and is then
// switched, while running, to bidirectional mode.
//
// Clocks: TDC clock 149.88 ns, DCO clock 16 ns (62.5 MHz), reference 19.84 us
// (1240 DCO clocks, 50.40 kHz, 10 codes above the 50 kHz nominal) starting 5 us after
// reset so that the reference detector starts saturated.
//  1. Shift in a unidirectional configuration (every node listens to its upper and left
//     neighbours; node 0 to the reference), Kp = 1.0, Ki = 1/16, and load it.
//  2. Run about 30 ms. Check that every node has locked: over the last 100 periods every
//     active link error is within +/-2 TDC steps and every DCO code is 808 +/-2
//     (2^11 - 1240), and that the right/bottom inputs are still weighted to zero.
//  3. Shift in the bidirectional configuration (all links weight 1) while the network
//     runs and load it in one clock. Check that the right and bottom inputs become
//     active, and that from 40 ms to 50 ms the network stays locked (link errors within
//     +/-3, codes 808 +/-4: with four links the proportional path alone moves the code
//     by the sum of four +/-1 errors) and every node clock stays within 1.5 us of the
//     reference.
// Mechanisms counted (each must occur): detector saturation, a zero-error comparison,
// configuration loads, the unidirectional-to-bidirectional switch, and non-zero errors on
// right links and on bottom links after the switch.
module tb_adpll_network;
  import adpll_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam realtime T_REF = 19840ns;
  logic clk_tdc = 0, clk_dco = 0, rst_n = 0, f_ref = 0;
  logic cfg_sdi = 0, cfg_shift = 0, cfg_load = 0, cfg_sdo;
  logic node_clk [NODES];
  logic node_div [NODES];
  logic [NC-1:0] node_code [NODES];
  sum_t node_total_err [NODES];
  logic signed [ERR_W+KW_W:0] node_werr [NODES][N_IN];
  int checks = 0, failures = 0;
  int n_ref = 0, n_sat = 0, n_zero = 0, n_load = 0, n_switch = 0, n_right = 0, n_bottom = 0;
  bit bidir = 0;
  logic signed [ERR_W+KW_W:0] prev_w1 = '0;
  realtime t_ref_edge;

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
    #70ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // detector activity, seen through the weighted errors of the enabled links
  always @(posedge clk_tdc) begin
    for (int n = 0; n < NODES; n++)
      for (int i = 0; i < N_IN; i++) begin
        if (node_werr[n][i] == 15 || node_werr[n][i] == -15) n_sat++;
        if (bidir && i == IN_RIGHT && node_werr[n][i] != 0) n_right++;
        if (bidir && i == IN_BOTTOM && node_werr[n][i] != 0) n_bottom++;
      end
    // node 2's left input (weight 1) returning to zero: a zero-error comparison
    if (node_werr[1][IN_LEFT] == 0 && prev_w1 != 0) n_zero++;
    prev_w1 = node_werr[1][IN_LEFT];
  end

  function automatic node_cfg_t make_cfg(int n, bit bi);
    node_cfg_t c;
    int r, col;
    r = n / COLS; col = n % COLS;
    c = '0;
    c.kp = gain_t'(256);    // 1.0
    c.ki = gain_t'(16);     // 1/16
    c.kw[IN_LEFT]   = weight_t'((col > 0 || n == 0) ? 1 : 0);
    c.kw[IN_TOP]    = weight_t'((r > 0) ? 1 : 0);
    c.kw[IN_RIGHT]  = weight_t'((bi && col < COLS - 1) ? 1 : 0);
    c.kw[IN_BOTTOM] = weight_t'((bi && r < ROWS - 1) ? 1 : 0);
    return c;
  endfunction

  task automatic load_config(input bit bi);
    logic [NODES*CFG_W-1:0] word;
    for (int n = 0; n < NODES; n++) word[n*CFG_W +: CFG_W] = make_cfg(n, bi);
    for (int b = NODES * CFG_W - 1; b >= 0; b--) begin
      @(negedge clk_tdc);
      cfg_sdi = word[b]; cfg_shift = 1;
    end
    @(negedge clk_tdc);
    cfg_shift = 0;
    cfg_load = 1;
    @(negedge clk_tdc);
    cfg_load = 0;
    n_load++;
  endtask

  // watch all links and codes for `periods` reference periods
  task automatic observe(input int periods, output int worst_err,
                         output int worst_code);
    int stop_at;
    worst_err = 0; worst_code = 0;
    stop_at = n_ref + periods;
    while (n_ref < stop_at) begin
      @(posedge clk_tdc);
      for (int n = 0; n < NODES; n++) begin
        int dc;
        for (int i = 0; i < N_IN; i++) begin
          int e;
          e = node_werr[n][i];
          if (e < 0) e = -e;
          if (e > worst_err) worst_err = e;
        end
        dc = int'(node_code[n]) - 808;
        if (dc < 0) dc = -dc;
        if (dc > worst_code) worst_code = dc;
      end
    end
  endtask

  // skew of every node's divided clock against the reference edge
  realtime skew [NODES];
  realtime max_skew [NODES];
  bit track = 0;
  for (genvar n = 0; n < NODES; n++) begin : g_skew
    always @(posedge node_div[n]) begin
      realtime s;
      s = $realtime - t_ref_edge;
      if (s > T_REF / 2) s = s - T_REF;
      skew[n] = s;
      if (s < 0) s = -s;
      if (track && s > max_skew[n]) max_skew[n] = s;
    end
    initial max_skew[n] = 0;
  end

  initial begin
    int we, wc;
    #1us rst_n = 1;
    load_config(0);
    // 2. unidirectional lock
    wait (n_ref == 1420);
    observe(100, we, wc);
    $display("unidirectional: max |link error| %0d, max |code-808| %0d", we, wc);
    checks++;
    if (we > 2 || wc > 2) begin failures++; $display("FAIL unidirectional network not locked"); end
    for (int n = 0; n < NODES; n++) begin
      checks++;
      if (node_werr[n][IN_RIGHT] != 0 || node_werr[n][IN_BOTTOM] != 0) begin
        failures++; $display("FAIL node %0d: right/bottom active in unidirectional mode", n);
      end
    end
    // 3. switch to bidirectional while running
    load_config(1);
    bidir = 1;
    n_switch++;
    wait (n_ref == 2000);
    track = 1;
    observe(520, we, wc);
    track = 0;
    $display("bidirectional: max |link error| %0d, max |code-808| %0d", we, wc);
    checks++;
    if (we > 3 || wc > 4) begin failures++; $display("FAIL bidirectional network not locked"); end
    for (int n = 0; n < NODES; n++) begin
      checks++;
      $display("node %2d skew to reference: last %8.1f ns, largest %8.1f ns", n + 1, skew[n], max_skew[n]);
      if (max_skew[n] > 1500) begin
        failures++; $display("FAIL node %0d skew %0.1f ns", n + 1, max_skew[n]);
      end
    end
    $display("mechanisms: saturation %0d, zero error %0d, loads %0d, switches %0d, right links %0d, bottom links %0d",
             n_sat, n_zero, n_load, n_switch, n_right, n_bottom);
    checks++; if (n_sat == 0)      begin failures++; $display("FAIL no saturation seen"); end
    checks++; if (n_zero == 0)     begin failures++; $display("FAIL no zero-error comparison seen"); end
    checks++; if (n_load != 2)     begin failures++; $display("FAIL loads"); end
    checks++; if (n_switch != 1)   begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_right == 0)    begin failures++; $display("FAIL right links never active"); end
    checks++; if (n_bottom == 0)   begin failures++; $display("FAIL bottom links never active"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
