// tb_tdc -- drives MODE intervals of 0 to 24 clock periods followed by a stop pulse and
// checks that the chronometer reports the length, saturated at 2^W-1, at the clock
// edge that samples the stop, with a single valid pulse.
module tb_tdc;
  localparam int W = 4;
  logic clk = 0, rst_n = 0, mode = 0, stop = 0;
  logic [W-1:0] dout;
  logic valid;
  int checks = 0, failures = 0, nvalid = 0;

  tdc #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (valid) nvalid++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
      for (int k = 0; k <= 24; k++) begin
        int exp_v, nv0;
        @(negedge clk);
        nv0 = nvalid;
        mode = (k > 0);
        repeat (k) @(negedge clk);
        mode = 0; stop = 1;
        checks++;
        if (valid) begin failures++; $display("FAIL k=%0d valid too early", k); end
        @(negedge clk);
        stop = 0;
        exp_v = (k > (1 << W) - 1) ? (1 << W) - 1 : k;
        checks++;
        if (!valid || int'(dout) != exp_v) begin
          failures++;
          $display("FAIL k=%0d dout=%0d exp=%0d valid=%b", k, dout, exp_v, valid);
        end
        repeat (1 + rep) @(negedge clk);
        checks++;
        if (nvalid - nv0 != 1) begin failures++; $display("FAIL k=%0d %0d valid pulses", k, nvalid - nv0); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
