// tb_pfd -- drives the phase detector with two 50 kHz clocks whose rising edges are
// offset by a random delay d (-3.5 us .. +3.5 us) and a 149.88 ns TDC clock that is not
// related to them. Expected: one result per period, err = +n when the plus clock leads
// and -n when it lags, with n the number of TDC periods in |d| rounded down or up
// (counter quantisation against an unaligned clock), saturated at 15; coincident edges
// give 0. Also checks the transfer-characteristic property that the code never exceeds the analytical
// value by more than one step and keeps the error's sign.
module tb_pfd;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 4;
  localparam realtime T_TDC = 149.88ns;
  logic clk = 0, rst_n = 0, clk_p = 0, clk_m = 0;
  logic signed [W:0] err;
  logic valid;
  int checks = 0, failures = 0, nvalid = 0;
  int n_sat = 0, n_zero = 0, n_pos = 0, n_neg = 0;
  logic signed [W:0] last_err;

  pfd #(.W(W)) dut (.*);

  always #(T_TDC / 2) clk = ~clk;
  always @(posedge clk) if (valid) begin nvalid++; last_err = err; end

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_period(input realtime d);
    realtime a;
    int lo, hi, nv0, got;
    a = (d < 0) ? -d : d;
    nv0 = nvalid;
    fork
      begin
        if (d > 0) #(d);
        clk_m = 1; #10us; clk_m = 0;
      end
      begin
        if (d < 0) #(-d);
        clk_p = 1; #10us; clk_p = 0;
      end
    join
    #(10us - a);
    lo = int'($floor(a / T_TDC));
    hi = int'($ceil(a / T_TDC));
    if (lo > 15) lo = 15;
    if (hi > 15) hi = 15;
    got = (d < 0) ? -int'(last_err) : int'(last_err);
    checks++;
    if (nvalid - nv0 != 1) begin
      failures++; $display("FAIL d=%0t: %0d results in one period", d, nvalid - nv0);
    end
    checks++;
    if (got < lo || got > hi || (d != 0 && last_err != 0 && ((last_err < 0) != (d < 0)))) begin
      failures++; $display("FAIL d=%0t err=%0d expected magnitude %0d..%0d", d, last_err, lo, hi);
    end
    if (last_err == 15 || last_err == -15) n_sat++;
    if (last_err == 0) n_zero++;
    if (last_err > 0) n_pos++;
    if (last_err < 0) n_neg++;
  endtask

  initial begin
    #1us rst_n = 1;
    #3us;
    one_period(0);   // settle
    for (int i = 0; i < 300; i++) begin
      realtime d;
      int r;
      r = $urandom_range(0, 7000);
      d = (r - 3500) * 1ns;
      if (i % 25 == 0) d = 0;
      // d > 0: the minus clock's edge comes later, so the plus clock leads
      one_period(d);
    end
    checks++;
    if (n_sat == 0 || n_zero == 0 || n_pos == 0 || n_neg == 0) begin
      failures++; $display("FAIL coverage sat=%0d zero=%0d pos=%0d neg=%0d", n_sat, n_zero, n_pos, n_neg);
    end
    $display("saturated %0d zero %0d positive %0d negative %0d", n_sat, n_zero, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
