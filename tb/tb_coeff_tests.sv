// tb_coeff_tests -- runs the full 4x4 network (bidirectional, all links weight 1) with the
// three loop-filter coefficient sets of the published stability measurements and records
// the phase error between node 1 and node 2 (node 2's left input), as those measurements
// do:
//   TEST1  Ki = 0.7500  Kp = 0.0039   (192/256, 1/256)
//   TEST2  Ki = 4       Kp = 0.0078   (1024/256, 2/256)
//   TEST3  Ki = 0.3750  Kp = 0.4063   (96/256, 104/256)
// Each run starts from reset with the reference 5 us behind the nodes and 10 codes above
// nominal, and lasts RUN_PERIODS reference periods. Printed per run: largest |error| in the
// last quarter of the run and how often the error reached the saturation value 15.
// Checked: every run produces errors on the link; the configuration is applied.
module tb_coeff_tests;
  import adpll_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam realtime T_REF = 19840ns;
  localparam int RUN_PERIODS = 2500;
  logic clk_tdc = 0, clk_dco = 0, rst_n = 0, f_ref = 0;
  logic cfg_sdi = 0, cfg_shift = 0, cfg_load = 0, cfg_sdo;
  logic node_clk [NODES];
  logic node_div [NODES];
  logic [NC-1:0] node_code [NODES];
  sum_t node_total_err [NODES];
  logic signed [ERR_W+KW_W:0] node_werr [NODES][N_IN];
  int checks = 0, failures = 0;
  int n_ref = 0;
  bit ref_on = 0;

  adpll_network dut (.*);

  always #(149.88ns / 2) clk_tdc = ~clk_tdc;
  always #8ns clk_dco = ~clk_dco;

  always begin
    wait (ref_on);
    #5us;
    while (ref_on) begin
      f_ref = 1; n_ref++;
      #(T_REF / 2); f_ref = 0; #(T_REF / 2);
    end
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_config(input int kp, input int ki);
    logic [NODES*CFG_W-1:0] word;
    for (int n = 0; n < NODES; n++) begin
      node_cfg_t c;
      c = '0;
      c.kp = gain_t'(kp);
      c.ki = gain_t'(ki);
      c.kw[IN_LEFT]   = weight_t'((n % COLS > 0 || n == 0) ? 1 : 0);
      c.kw[IN_TOP]    = weight_t'((n / COLS > 0) ? 1 : 0);
      c.kw[IN_RIGHT]  = weight_t'((n % COLS < COLS - 1) ? 1 : 0);
      c.kw[IN_BOTTOM] = weight_t'((n / COLS < ROWS - 1) ? 1 : 0);
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

  task automatic run(input string name, input int kp, input int ki);
    int late_max, n_sat, n_upd;
    rst_n = 0; ref_on = 0; n_ref = 0;
    #1us rst_n = 1;
    load_config(kp, ki);
    checks++;
    if (dut.cfg[5].kp != gain_t'(kp) || dut.cfg[5].ki != gain_t'(ki)) begin
      failures++; $display("FAIL %s: configuration not applied", name);
    end
    ref_on = 1;
    late_max = 0; n_sat = 0; n_upd = 0;
    while (n_ref < RUN_PERIODS) begin
      @(posedge clk_tdc);
      if (dut.g_row[0].g_col[1].u_cell.left_valid) begin
        int e;
        e = dut.g_row[0].g_col[1].u_cell.left_err;
        n_upd++;
        if (e == 15 || e == -15) n_sat++;
        if (e < 0) e = -e;
        if (n_ref > RUN_PERIODS * 3 / 4 && e > late_max) late_max = e;
      end
    end
    $display("%s (Kp=%0d/256, Ki=%0d/256): node1-node2 |error| max in last quarter %0d, saturated %0d of %0d",
             name, kp, ki, late_max, n_sat, n_upd);
    checks++;
    if (n_upd < RUN_PERIODS / 2) begin failures++; $display("FAIL %s: link silent", name); end
    ref_on = 0;
    #40us;
  endtask

  initial begin
    run("TEST1", 1, 192);
    run("TEST2", 2, 1024);
    run("TEST3", 104, 96);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
