// tb_pfd_arith -- checks the sign/magnitude to two's-complement conversion of the phase
// detector's arithmetic block over every input value, and its one-cycle latency.
module tb_pfd_arith;
  localparam int W = 4;
  logic clk = 0, rst_n = 0, sign = 0, in_valid = 0;
  logic [W-1:0] dout = '0;
  logic signed [W:0] err;
  logic out_valid;
  int checks = 0, failures = 0;

  pfd_arith #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < (1 << W); m++) begin
        int exp_v;
        @(negedge clk);
        sign = s[0]; dout = W'(m); in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        exp_v = s ? -m : m;
        checks++;
        if (!out_valid || int'(err) != exp_v) begin
          failures++;
          $display("FAIL sign=%0d dout=%0d err=%0d exp=%0d valid=%b", s, m, err, exp_v, out_valid);
        end
        // holds the value while no new input is valid
        sign = ~sign; dout = ~dout;
        @(negedge clk);
        checks++;
        if (out_valid || int'(err) != exp_v) begin
          failures++;
          $display("FAIL hold: err=%0d exp=%0d valid=%b", err, exp_v, out_valid);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
