// tb_bbpfd -- drives random event patterns into the bang-bang detector and compares
// SIGN, MODE and `done` each cycle with a reference model of the event-driven automaton:
// the first event opens the interval, the other input's event closes it, repeated events
// of the leading input are ignored and coincident events give an empty interval.
module tb_bbpfd;
  logic clk = 0, rst_n = 0, a_rise = 0, b_rise = 0;
  logic sign, mode, done;
  int checks = 0, failures = 0;
  int m_state = 0;               // 0 idle, 1 a leads, 2 b leads
  bit m_sign = 0, m_done = 0;
  int n_pos = 0, n_neg = 0, n_tie = 0;

  bbpfd dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      bit a, b;
      a = ($urandom_range(0, 5) == 0);
      b = ($urandom_range(0, 5) == 0);
      a_rise = a; b_rise = b;
      @(posedge clk);
      // reference model update
      m_done = 0;
      case (m_state)
        0: if (a && b) begin m_sign = 0; m_done = 1; n_tie++; end
           else if (a) begin m_state = 1; m_sign = 0; end
           else if (b) begin m_state = 2; m_sign = 1; end
        1: if (b) begin m_state = 0; m_done = 1; n_pos++; end
        2: if (a) begin m_state = 0; m_done = 1; n_neg++; end
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if (sign != m_sign || mode != (m_state != 0) || done != m_done) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: sign=%b/%b mode=%b/%b done=%b/%b", i, sign, m_sign,
                   mode, m_state != 0, done, m_done);
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL coverage pos=%0d neg=%0d tie=%0d", n_pos, n_neg, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
