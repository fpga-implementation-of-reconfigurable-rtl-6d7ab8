// tb_cfg_chain -- shifts random words into the programming register, checks that the
// active word does not move while shifting, that one load pulse applies the whole word
// at once, the serial output, and the reset value.
module tb_cfg_chain;
  localparam int W = 40;
  localparam logic [W-1:0] RV = 40'h12_3456_789A;
  logic clk = 0, rst_n = 0, sdi = 0, shift = 0, load = 0;
  logic sdo;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  cfg_chain #(.W(W), .RST_VAL(RV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev, word;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (q !== RV) begin failures++; $display("FAIL reset value %h", q); end
    prev = RV;
    for (int n = 0; n < 20; n++) begin
      word = {$urandom, $urandom};
      for (int i = W - 1; i >= 0; i--) begin
        sdi = word[i]; shift = 1;
        @(negedge clk);
        checks++;
        if (q !== prev) begin failures++; $display("FAIL q moved while shifting"); end
      end
      shift = 0;
      checks++;
      if (sdo !== word[W-1]) begin failures++; $display("FAIL sdo"); end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (q !== word) begin failures++; $display("FAIL load q=%h exp=%h", q, word); end
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
