// tb_fo_node -- a single ADPLL (detector + FO node in a loop) locking to a reference.
//
// The node's left input is a phase detector comparing a reference clock with the node's
// divided clock; the other three links are weighted 0. The reference runs at 19.84 us
// (1240 DCO clocks of 16 ns, 50.40 kHz), 10 codes above the 50 kHz nominal, with a
// 6 us initial phase offset so that the detector starts in saturation. The loop gains
// are Kp = 1.0 and Ki = 1/16. Checked: the error saturates at first, the loop then locks
// with |error| <= 2 TDC steps over the last 100 reference periods, the DCO code settles
// at 2^11 - 1240 = 808 (+/-2), and the node's average period equals the reference
// period.
module tb_fo_node;
  import adpll_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam realtime T_REF = 19840ns;
  logic clk_tdc = 0, clk_dco = 0, rst_n = 0, f_ref = 0;
  err_t [N_IN-1:0] err;
  logic [N_IN-1:0] err_valid;
  node_cfg_t cfg;
  logic clk_out, div_out;
  logic [NC-1:0] code;
  sum_t total_err;
  logic signed [ERR_W+KW_W:0] werr [N_IN];
  err_t e_ref;
  logic v_ref;
  int checks = 0, failures = 0;
  int n_sat = 0, n_ref = 0, n_div = 0;
  realtime t_div_first, t_div_last;

  pfd #(.W(TDC_W)) u_pfd (.clk(clk_tdc), .rst_n, .clk_p(f_ref), .clk_m(div_out),
                          .err(e_ref), .valid(v_ref));

  always_comb begin
    err = '0;
    err_valid = '0;
    err[IN_LEFT] = e_ref;
    err_valid[IN_LEFT] = v_ref;
  end

  fo_node dut (.*);

  always #(149.88ns / 2) clk_tdc = ~clk_tdc;
  always #8ns clk_dco = ~clk_dco;

  initial begin
    #6us;
    forever begin f_ref = 1; #(T_REF / 2); f_ref = 0; #(T_REF / 2); n_ref++; end
  end

  always @(posedge clk_tdc) if (v_ref && (e_ref == 15 || e_ref == -15)) n_sat++;
  always @(posedge div_out) begin
    if (n_div == 0) t_div_first = $realtime;
    t_div_last = $realtime;
    n_div++;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int max_err, min_code, max_code, n0;
    realtime t0;
    cfg = '0;
    cfg.kp = gain_t'(256);
    cfg.ki = gain_t'(16);
    cfg.kw[IN_LEFT] = weight_t'(1);
    #1us rst_n = 1;
    wait (n_ref == 400);
    max_err = 0; min_code = 1 << NC; max_code = 0;
    n0 = n_div; t0 = t_div_last;
    while (n_ref < 500) begin
      @(posedge clk_tdc);
      if (v_ref) begin
        if (e_ref > max_err) max_err = e_ref;
        if (-e_ref > max_err) max_err = -e_ref;
      end
      if (int'(code) < min_code) min_code = code;
      if (int'(code) > max_code) max_code = code;
    end
    $display("saturated results %0d, |err| max %0d, code %0d..%0d", n_sat, max_err, min_code, max_code);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL detector never saturated"); end
    checks++;
    if (max_err > 2) begin failures++; $display("FAIL not locked, |err| up to %0d", max_err); end
    checks++;
    if (min_code < 806 || max_code > 810) begin failures++; $display("FAIL code off 808"); end
    checks++;
    begin
      realtime tp;
      tp = (t_div_last - t0) / (n_div - n0 - 0.0);
      $display("average node period %0.1f ns", tp);
      if (tp < 19800 || tp > 19880) begin failures++; $display("FAIL period %0.1f", tp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
