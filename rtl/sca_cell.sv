// sca_cell -- one tile of the 4x4 network: an FO node with the detectors on its left and
// lower borders.
//
// A tile at (ROW, COL) holds
//   * its FO node (loop filter, DCO, divider);
//   * the detector on its left border, when there is a left neighbour, or, in the
//     upper-left tile, the detector comparing the reference clock with this node;
//   * the detector on its lower border, when there is a lower neighbour.
// Every detector is shared by two nodes. Its plus input is the upper/left (upstream)
// clock and its minus input the lower/right one; err = phase(plus) - phase(minus) goes to
// the downstream node and -err to the upstream node. So every node sees, on each link,
// phase(neighbour) - phase(own clock), and a positive value makes it speed up.
// The node's filter inputs are ordered left, right, top, bottom; a link a tile does not
// have reads zero and never updates.
//
// The tiling, the detector placement, the shared detectors and the sign convention (plus
// on the upstream side, e to one node and its negation to the other) follow the network
// topology of the published prototype; the port names are this design's.
module sca_cell
  import adpll_pkg::*;
#(
  parameter int unsigned ROW     = 0,
  parameter int unsigned COL     = 0,
  parameter int unsigned NC_P    = NC,
  parameter int unsigned C_NOM_P = C_NOM,
  parameter int unsigned DIV_M   = 1,
  parameter int unsigned UPD_DLY = (1 << TDC_W) + 6
) (
  input  logic            clk_tdc,
  input  logic            clk_dco,
  input  logic            rst_n,
  input  node_cfg_t       cfg,
  input  logic            left_clk,      // left neighbour's divided clock, or the reference
  input  logic            down_clk,      // lower neighbour's divided clock
  input  err_t            right_err,     // error of the right tile's left detector
  input  logic            right_valid,
  input  err_t            top_err,       // error of the upper tile's lower detector
  input  logic            top_valid,
  output err_t            left_err,      // this tile's left detector (to the left node, negated)
  output logic            left_valid,
  output err_t            bottom_err,    // this tile's lower detector (to the lower node)
  output logic            bottom_valid,
  output logic            clk_out,
  output logic            div_out,
  output logic [NC_P-1:0] code,
  output sum_t            total_err,
  output logic signed [ERR_W+KW_W:0] werr [N_IN]
);
  localparam bit HAS_LEFT   = (COL > 0) || (ROW == 0);
  localparam bit HAS_BOTTOM = (ROW < ROWS - 1);

  err_t [N_IN-1:0] err;
  logic [N_IN-1:0] err_valid;

  if (HAS_LEFT) begin : g_left
    pfd #(.W(TDC_W)) u_pfd_left (.clk(clk_tdc), .rst_n, .clk_p(left_clk), .clk_m(div_out),
                                 .err(left_err), .valid(left_valid));
  end else begin : g_no_left
    assign left_err   = '0;
    assign left_valid = 1'b0;
  end

  if (HAS_BOTTOM) begin : g_bottom
    pfd #(.W(TDC_W)) u_pfd_bottom (.clk(clk_tdc), .rst_n, .clk_p(div_out), .clk_m(down_clk),
                                   .err(bottom_err), .valid(bottom_valid));
  end else begin : g_no_bottom
    assign bottom_err   = '0;
    assign bottom_valid = 1'b0;
  end

  always_comb begin
    err[IN_LEFT]         = left_err;
    err_valid[IN_LEFT]   = left_valid;
    err[IN_RIGHT]        = -right_err;
    err_valid[IN_RIGHT]  = right_valid;
    err[IN_TOP]          = top_err;
    err_valid[IN_TOP]    = top_valid;
    err[IN_BOTTOM]       = -bottom_err;
    err_valid[IN_BOTTOM] = bottom_valid;
  end

  fo_node #(.NC_P(NC_P), .C_NOM_P(C_NOM_P), .DIV_M(DIV_M), .UPD_DLY(UPD_DLY)) u_fo (
    .clk_tdc, .clk_dco, .rst_n, .err, .err_valid, .cfg,
    .clk_out, .div_out, .code, .total_err, .werr);
endmodule
