// tb_freq_div -- feeds the divider with a model DCO (period P clocks, high for the first
// P/2) and checks the output period (M*P clocks) and high time (M*P/2 clocks) for
// M = 1 and M = 3, with P changing between runs.
module tb_freq_div;
  logic clk = 0, rst_n = 0;
  logic in_clk, in_evt;
  logic out1, out3;
  int checks = 0, failures = 0;
  int P = 10, cnt = 0;

  freq_div           d1 (.clk, .rst_n, .in_clk, .in_evt, .out_clk(out1));
  freq_div #(.M(3))  d3 (.clk, .rst_n, .in_clk, .in_evt, .out_clk(out3));

  always #5 clk = ~clk;

  // model DCO: evt in the first clock of each period, clock high one clock later
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin cnt <= 0; in_evt <= 0; in_clk <= 0; end
    else begin
      cnt    <= (cnt == P - 1) ? 0 : cnt + 1;
      in_evt <= (cnt == P - 1);
      in_clk <= (cnt < P / 2);
    end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int m, input int exp_period, input int exp_high);
    int t_rise = -1, t_fall = -1, t = 0, done_n = 0;
    logic prev;
    prev = (m == 1) ? out1 : out3;
    while (done_n < 4) begin
      logic cur;
      @(posedge clk); t++;
      cur = (m == 1) ? out1 : out3;
      if (cur && !prev) begin
        if (t_rise >= 0) begin
          checks++;
          if (t - t_rise != exp_period) begin
            failures++; $display("FAIL M=%0d period %0d exp %0d", m, t - t_rise, exp_period);
          end
          checks++;
          if (t_fall - t_rise != exp_high) begin
            failures++; $display("FAIL M=%0d high %0d exp %0d", m, t_fall - t_rise, exp_high);
          end
          done_n++;
        end
        t_rise = t;
      end
      if (!cur && prev) t_fall = t;
      prev = cur;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      P = (i == 0) ? 10 : (i == 1) ? 16 : 24;
      repeat (200) @(posedge clk);
      measure(1, P, P / 2);
      measure(3, 3 * P, 3 * P / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
