// fo_node -- filter/oscillator (FO) node: the loop filter, DCO and divider of one ADPLL.
//
// The node takes the phase errors measured against its (up to four) neighbours, filters
// them (loop_filter), and drives a counter DCO (dco) whose output is divided by M
// (freq_div). The divided clock is what the neighbouring phase detectors compare.
//
// Two clocks: clk_tdc runs the filter (and, outside the node, the detectors); clk_dco runs
// the oscillator and divider. The filter is evaluated once per period of the node's own
// divided clock: its rising edge is resynchronised into the clk_tdc domain and `tick` is
// issued UPD_DLY clk_tdc cycles later, late enough for every detector measuring a phase
// error of up to 2^TDC_W-1 periods to have reported it. This update timing is this
// design's choice; the published prototype says only that the errors are added and filtered once
// per reference period.
module fo_node
  import adpll_pkg::*;
#(
  parameter int unsigned NC_P    = NC,
  parameter int unsigned C_NOM_P = C_NOM,
  parameter int unsigned DIV_M   = 1,
  parameter int unsigned UPD_DLY = (1 << TDC_W) + 6
) (
  input  logic                 clk_tdc,
  input  logic                 clk_dco,
  input  logic                 rst_n,
  input  err_t [N_IN-1:0]      err,        // phase error to each neighbour (link_e order)
  input  logic [N_IN-1:0]      err_valid,
  input  node_cfg_t            cfg,
  output logic                 clk_out,    // DCO output clock
  output logic                 div_out,    // divided clock, compared with neighbours
  output logic [NC_P-1:0]      code,       // DCO control word
  output sum_t                 total_err,  // weighted error sum
  output logic signed [ERR_W+KW_W:0] werr [N_IN]
);
  localparam int unsigned DW = $clog2(UPD_DLY + 1);

  logic          div_rise, tick, evt;
  logic [DW-1:0] dly;

  edge_sync u_sync (.clk(clk_tdc), .rst_n, .d(div_out), .rise(div_rise));

  always_ff @(posedge clk_tdc or negedge rst_n) begin
    if (!rst_n) begin
      dly  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (dly == DW'(1));
      if (div_rise)       dly <= DW'(UPD_DLY);
      else if (dly != '0) dly <= dly - 1'b1;
    end
  end

  loop_filter #(.NC_P(NC_P), .C_NOM_P(C_NOM_P)) u_lf (
    .clk(clk_tdc), .rst_n, .err, .err_valid, .cfg, .tick,
    .werr, .total_err, .code, .code_valid());

  dco #(.NC(NC_P), .RST_CODE(C_NOM_P)) u_dco (
    .clk(clk_dco), .rst_n, .code, .clk_out, .evt);

  freq_div #(.M(DIV_M)) u_div (
    .clk(clk_dco), .rst_n, .in_clk(clk_out), .in_evt(evt), .out_clk(div_out));
endmodule
