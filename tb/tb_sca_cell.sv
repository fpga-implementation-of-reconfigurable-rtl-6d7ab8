// tb_sca_cell -- checks the wiring and sign conventions of a network tile.
//
// Tile (0,0) has a left detector (reference side) and a lower detector. With Kp = Ki = 0
// its node runs free at the nominal 20 us period. The testbench drives the left clock
// 1.0 us ahead of the node's clock and the lower neighbour's clock 2.0 us behind it, and
// feeds constant errors on the right (-5) and top (+7) inputs. Expected: left_err = +6..7
// (left leads), bottom_err = +13..14 (this node leads the lower one), and the node's
// weighted inputs left = +left_err*kw, right = +5*kw, top = +7*kw,
// bottom = -bottom_err*kw, with their sum on total_err. Tile (3,0), at the lower-left
// corner, must have neither detector: its left and bottom outputs never report.
module tb_sca_cell;
  import adpll_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk_tdc = 0, clk_dco = 0, rst_n = 0;
  logic left_clk = 0, down_clk = 0;
  node_cfg_t cfg;
  err_t right_err = err_t'(-5), top_err = err_t'(7);
  logic right_valid = 0, top_valid = 0;
  err_t left_err, bottom_err;
  logic left_valid, bottom_valid, clk_out, div_out;
  logic [NC-1:0] code;
  sum_t total_err;
  logic signed [ERR_W+KW_W:0] werr [N_IN];
  // corner tile
  err_t c_left_err, c_bottom_err;
  logic c_left_valid, c_bottom_valid, c_clk, c_div;
  logic [NC-1:0] c_code;
  sum_t c_total;
  logic signed [ERR_W+KW_W:0] c_werr [N_IN];
  int checks = 0, failures = 0, n_corner = 0;

  sca_cell #(.ROW(0), .COL(0)) dut (.*);
  sca_cell #(.ROW(3), .COL(0)) corner (
    .clk_tdc, .clk_dco, .rst_n, .cfg, .left_clk, .down_clk,
    .right_err, .right_valid, .top_err, .top_valid,
    .left_err(c_left_err), .left_valid(c_left_valid),
    .bottom_err(c_bottom_err), .bottom_valid(c_bottom_valid),
    .clk_out(c_clk), .div_out(c_div), .code(c_code), .total_err(c_total), .werr(c_werr));

  always #(149.88ns / 2) clk_tdc = ~clk_tdc;
  always #8ns clk_dco = ~clk_dco;
  always @(posedge clk_tdc) if (c_left_valid || c_bottom_valid) n_corner++;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // neighbour clocks locked to the node's nominal 20 us period. The left clock starts
  // 0.5 us behind the node, so that the detector pairs the right edges, and then moves
  // to 1.0 us ahead with one shortened period.
  initial begin
    @(posedge div_out);
    #(0.5us);
    repeat (2) begin left_clk = 1; #10us; left_clk = 0; #10us; end
    left_clk = 1; #10us; left_clk = 0; #8.5us;
    forever begin left_clk = 1; #10us; left_clk = 0; #10us; end
  end
  initial begin
    @(posedge div_out);
    #(2us);
    forever begin down_clk = 1; #10us; down_clk = 0; #10us; end
  end

  task automatic check_inputs(input int kl, input int kr, input int kt, input int kb);
    int s;
    checks++;
    if (werr[IN_LEFT] != left_err * kl || werr[IN_RIGHT] != 5 * kr ||
        werr[IN_TOP] != 7 * kt || werr[IN_BOTTOM] != -bottom_err * kb) begin
      failures++;
      $display("FAIL weighted inputs %0d %0d %0d %0d (kw %0d %0d %0d %0d, left %0d bottom %0d)",
               werr[IN_LEFT], werr[IN_RIGHT], werr[IN_TOP], werr[IN_BOTTOM], kl, kr, kt, kb,
               left_err, bottom_err);
    end
    s = left_err * kl + 5 * kr + 7 * kt - bottom_err * kb;
    checks++;
    if (int'(total_err) != s) begin failures++; $display("FAIL total_err %0d exp %0d", total_err, s); end
  endtask

  initial begin
    cfg = '0;
    #1us rst_n = 1;
    @(posedge clk_tdc);
    right_valid = 1; top_valid = 1;
    @(posedge clk_tdc);
    right_valid = 0; top_valid = 0;
    #200us;
    for (int n = 0; n < 40; n++) begin
      @(posedge div_out);
      #10us;
      checks++;
      if (left_err < 6 || left_err > 7) begin failures++; $display("FAIL left_err %0d", left_err); end
      checks++;
      if (bottom_err < 13 || bottom_err > 14) begin failures++; $display("FAIL bottom_err %0d", bottom_err); end
      cfg.kw[IN_LEFT]   = weight_t'(n % 4);
      cfg.kw[IN_RIGHT]  = weight_t'((n / 4) % 4);
      cfg.kw[IN_TOP]    = weight_t'((n + 1) % 4);
      cfg.kw[IN_BOTTOM] = weight_t'((n / 2) % 4);
      #1ns;
      check_inputs(n % 4, (n / 4) % 4, (n + 1) % 4, (n / 2) % 4);
      checks++;
      if (code != NC'(C_NOM)) begin failures++; $display("FAIL code moved with zero gains"); end
    end
    checks++;
    if (n_corner != 0) begin failures++; $display("FAIL corner tile reported %0d errors", n_corner); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
