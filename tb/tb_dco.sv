// tb_dco -- checks the counter DCO against its period formula: the output period is (2^NC - code)
// DCO clocks and the high time half of it, for the default NC = 11 at codes around the
// nominal 798 (1250 clocks, 50 kHz at 62.5 MHz), at extremes, and that a new code takes
// effect at the following period boundary, never inside a period.
module tb_dco;
  localparam int NC = 11;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] code = NC'(798);
  logic clk_out, evt;
  int checks = 0, failures = 0;
  int t = 0, t_rise = -1, t_fall = -1, t_evt = -1;
  int periods [$];
  int highs [$];

  dco dut (.*);

  always #8 clk = ~clk;   // 62.5 MHz

  always @(posedge clk) begin
    t <= t + 1;
    if (evt) t_evt <= t;
  end

  always @(posedge clk_out) begin
    if (t_rise >= 0) begin
      periods.push_back(t - t_rise);
      highs.push_back(t_fall - t_rise);
    end
    t_rise = t;
  end
  always @(negedge clk_out) t_fall = t;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_code(input int c);
    int p;
    // change the code at a random point inside a period
    @(posedge clk_out);
    repeat ($urandom_range(1, 200)) @(posedge clk);
    code = NC'(c);
    // the period in progress keeps its old length; skip it and a few more edges, since
    // very short periods can pass while the code crosses the synchroniser
    repeat (4) @(posedge clk_out);
    periods.delete(); highs.delete();
    repeat (3) @(posedge clk_out);
    p = (1 << NC) - c;
    foreach (periods[i]) begin
      checks++;
      if (periods[i] != p || highs[i] != p / 2) begin
        failures++;
        $display("FAIL code %0d: period %0d high %0d, exp %0d / %0d", c, periods[i], highs[i], p, p / 2);
      end
    end
  endtask

  initial begin
    int p_old;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset value gives the nominal period
    repeat (3) @(posedge clk_out);
    checks++;
    if (periods[$] != 1250) begin failures++; $display("FAIL nominal period %0d", periods[$]); end
    run_code(798);
    run_code(799);
    run_code(797);
    run_code(1000);
    run_code(0);
    run_code(2046);
    run_code(1500);
    // a code change lands only at a period boundary: period in progress keeps old length
    run_code(798);
    @(posedge clk_out);
    repeat (100) @(posedge clk);
    code = NC'(898);
    @(posedge clk_out);
    @(posedge clk_out);
    @(posedge clk);
    checks++;
    if (periods[$-1] != 1250 || periods[$] != 1150) begin
      failures++;
      $display("FAIL code change inside a period: %p", periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
