// tb_loop_filter -- drives random phase errors, link weights and Kp/Ki into the loop
// filter and compares the weighted errors, the error sum and the DCO code after each
// tick with an integer model of H(z) = Kp + Ki/(1 - z^-1) (gains with 8 fractional bits,
// floor of the result, nominal offset 798, integrator clamp +/-2^11 and code clamp
// 0..2046). Also checks the one-cycle latency of the code and that a held error keeps its
// value between detector updates. The Kp/Ki pairs used include the ones quoted for the
// three measured configurations (Ki = 0.75, Kp = 0.0039; Ki = 4, Kp = 0.0078;
// Ki = 0.375, Kp = 0.4063).
module tb_loop_filter;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  err_t [N_IN-1:0] err = '0;
  logic [N_IN-1:0] err_valid = '0;
  node_cfg_t cfg = '0;
  logic signed [ERR_W+KW_W:0] werr [N_IN];
  sum_t total_err;
  logic [NC-1:0] code;
  logic code_valid;
  int checks = 0, failures = 0;
  int n_int_clamp = 0, n_code_clamp = 0;

  longint m_held [N_IN];
  longint m_integ = 0;

  loop_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_err();
    int r;
    r = $urandom_range(0, 30);
    return r - 15;
  endfunction

  initial begin
    longint m_sum, m_y, m_code;
    int kps [4] = '{1, 2, 104, 256};     // 0.0039, 0.0078, 0.4063, 1.0
    int kis [4] = '{192, 1024, 96, 16};  // 0.75, 4, 0.375, 0.0625
    foreach (m_held[i]) m_held[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (code != NC'(C_NOM)) begin failures++; $display("FAIL reset code %0d", code); end
    for (int n = 0; n < 6000; n++) begin
      if (n % 500 == 0) begin
        int sel = (n / 500) % 4;
        cfg.kp = gain_t'(kps[sel]);
        cfg.ki = gain_t'(kis[sel]);
        for (int i = 0; i < N_IN; i++) cfg.kw[i] = weight_t'($urandom_range(0, 3));
        if ((n / 500) % 3 == 0) cfg.kw = {2'd1, 2'd1, 2'd1, 2'd1};
      end
      // new detector results on some links
      for (int i = 0; i < N_IN; i++) begin
        err_valid[i] = ($urandom_range(0, 1) == 1);
        err[i] = err_t'(rnd_err());
        if ((n / 250) % 4 == 1 && err[i] < 0) err[i] = -err[i];   // drive the integrator up
        if ((n / 250) % 4 == 3 && err[i] > 0) err[i] = -err[i];   // and down
        if (err_valid[i]) m_held[i] = longint'(err[i]);
      end
      @(negedge clk);
      err_valid = '0;
      err = '0;           // must not disturb the held values
      // combinational outputs
      m_sum = 0;
      for (int i = 0; i < N_IN; i++) begin
        longint w;
        w = m_held[i] * longint'(cfg.kw[i]);
        m_sum += w;
        checks++;
        if (longint'(werr[i]) != w) begin
          failures++; $display("FAIL werr[%0d]=%0d exp %0d", i, werr[i], w);
        end
      end
      checks++;
      if (longint'(total_err) != m_sum) begin
        failures++; $display("FAIL total_err=%0d exp %0d", total_err, m_sum);
      end
      // filter evaluation
      tick = 1;
      @(negedge clk);
      tick = 0;
      m_integ += m_sum * longint'(cfg.ki);
      if (m_integ > (longint'(1) << 19))  begin m_integ = longint'(1) << 19; n_int_clamp++; end
      if (m_integ < -(longint'(1) << 19)) begin m_integ = -(longint'(1) << 19); n_int_clamp++; end
      m_y = (m_sum * longint'(cfg.kp) + m_integ) >>> 8;
      m_code = m_y + C_NOM;
      if (m_code < 0)    begin m_code = 0; n_code_clamp++; end
      if (m_code > 2046) begin m_code = 2046; n_code_clamp++; end
      checks++;
      if (!code_valid || longint'(code) != m_code) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d code=%0d exp %0d valid=%b", n, code, m_code, code_valid);
      end
      // pull the integrator back now and then so that both clamps and the middle are visited
      if (n % 1000 == 999) begin
        rst_n = 0; m_integ = 0; foreach (m_held[i]) m_held[i] = 0;
        @(negedge clk);
        rst_n = 1;
      end
    end
    checks++;
    if (n_int_clamp == 0 || n_code_clamp == 0) begin
      failures++; $display("FAIL clamps not exercised: %0d %0d", n_int_clamp, n_code_clamp);
    end
    $display("integrator clamps %0d, code clamps %0d", n_int_clamp, n_code_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
