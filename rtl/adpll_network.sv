// adpll_network -- reconfigurable 4x4 network of coupled all-digital PLLs for distributed
// clock generation.
//
// Sixteen FO nodes, each a loop filter driving a counter DCO, are placed on a 4x4 grid
// (node n = 4*row + col, tile SCA<n>). A phase detector sits on every border between two
// neighbours (24 of them) and one more compares the reference clock f_ref with node 0.
// Each node adds its weighted errors to its neighbours and filters the sum, so the whole
// grid locks to the reference in frequency and phase.
//
// Every coefficient of every node (Kp, Ki and four 2-bit link weights, 32 bits per node,
// 512 bits in all) is shifted in serially through cfg_sdi while cfg_shift is high, most
// significant bit first, node 15's word first, and applied to all nodes in the same clock
// by a cfg_load pulse. Setting a link weight to 0 or 1 disconnects or connects that link,
// which is how the network is switched at run time between the unidirectional mode
// (each node listens only to its upper and left neighbours) and the bidirectional mode
// (all links). After reset all coefficients are zero and every DCO runs free at its
// nominal code.
//
// Clocks: clk_tdc (the detector resolution, 6.672 MHz in the reference setup) runs the
// detectors, filters and configuration chain; clk_dco (62.5 MHz) runs the DCOs and
// dividers. The two are treated as asynchronous; f_ref is asynchronous to both.
// The topology, the 4x4 size and the link switching follow the published prototype; the chain's bit
// order, the reset configuration and the observation ports are this design's.
module adpll_network
  import adpll_pkg::*;
#(
  parameter int unsigned NC_P    = NC,
  parameter int unsigned C_NOM_P = C_NOM,
  parameter int unsigned DIV_M   = 1,
  parameter int unsigned UPD_DLY = (1 << TDC_W) + 6
) (
  input  logic            clk_tdc,
  input  logic            clk_dco,
  input  logic            rst_n,
  input  logic            f_ref,                      // reference clock
  input  logic            cfg_sdi,
  input  logic            cfg_shift,
  input  logic            cfg_load,
  output logic            cfg_sdo,
  output logic            node_clk  [NODES],          // DCO clocks
  output logic            node_div  [NODES],          // divided clocks
  output logic [NC_P-1:0] node_code [NODES],          // DCO control words
  output sum_t            node_total_err [NODES],     // weighted error sums
  output logic signed [ERR_W+KW_W:0] node_werr [NODES][N_IN] // weighted errors per link
);
  logic [NODES*CFG_W-1:0] cfg_q;
  node_cfg_t       cfg       [NODES];
  err_t            left_err  [NODES];
  logic            left_vld  [NODES];
  err_t            bot_err   [NODES];
  logic            bot_vld   [NODES];

  cfg_chain #(.W(NODES*CFG_W)) u_cfg (
    .clk(clk_tdc), .rst_n, .sdi(cfg_sdi), .shift(cfg_shift), .load(cfg_load),
    .sdo(cfg_sdo), .q(cfg_q));

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned N = r * COLS + c;
      logic left_clk, down_clk, right_vld, top_vld;
      err_t right_err, top_err;

      assign cfg[N] = cfg_q[N*CFG_W +: CFG_W];

      if (c == 0) begin : g_l0
        assign left_clk = (r == 0) ? f_ref : 1'b0;
      end else begin : g_l
        assign left_clk = node_div[N-1];
      end

      if (r == ROWS - 1) begin : g_d0
        assign down_clk = 1'b0;
      end else begin : g_d
        assign down_clk = node_div[N+COLS];
      end

      if (c == COLS - 1) begin : g_r0
        assign right_err = '0;
        assign right_vld = 1'b0;
      end else begin : g_r
        assign right_err = left_err[N+1];
        assign right_vld = left_vld[N+1];
      end

      if (r == 0) begin : g_t0
        assign top_err = '0;
        assign top_vld = 1'b0;
      end else begin : g_t
        assign top_err = bot_err[N-COLS];
        assign top_vld = bot_vld[N-COLS];
      end

      sca_cell #(.ROW(r), .COL(c), .NC_P(NC_P), .C_NOM_P(C_NOM_P), .DIV_M(DIV_M),
                 .UPD_DLY(UPD_DLY)) u_cell (
        .clk_tdc, .clk_dco, .rst_n, .cfg(cfg[N]),
        .left_clk, .down_clk, .right_err, .right_valid(right_vld),
        .top_err, .top_valid(top_vld),
        .left_err(left_err[N]), .left_valid(left_vld[N]),
        .bottom_err(bot_err[N]), .bottom_valid(bot_vld[N]),
        .clk_out(node_clk[N]), .div_out(node_div[N]), .code(node_code[N]),
        .total_err(node_total_err[N]), .werr(node_werr[N]));
    end
  end
endmodule
