// adpll_pkg -- shared constants and types of the coupled ADPLL network.
//
// The network is a 4x4 grid of filter/oscillator (FO) nodes. Each border between two
// nodes carries one phase-frequency detector (PFD) that produces a 5-bit signed phase
// error; the node on the "minus" side uses the error as it is and the node on the "plus"
// side uses its negation. Each node weighs its (up to four) errors, sums them and runs a
// proportional-integral filter whose output drives a counter-based DCO.
//
// From the published prototype: the 4x4 size, the 5-bit signed PFD code, four filter inputs, the
// 62.5 MHz DCO clock and 50 kHz nominal frequency (hence 1250 DCO clocks per period).
// Own choices: the 4-bit TDC magnitude (so that error = +/-15), the 9-bit error sum
// (matches the three-hex-digit Total_Err value such as 1FE shown on a logic analyser
// trace), 2-bit link weights, 12-bit filter gains with 8 fractional bits, Nc = 11 and
// the nominal code 2^11 - 1250 = 798.
package adpll_pkg;

  // network size
  localparam int unsigned ROWS = 4;
  localparam int unsigned COLS = 4;
  localparam int unsigned NODES = ROWS * COLS;

  // phase detector
  localparam int unsigned TDC_W = 4;          // unsigned TDC magnitude
  localparam int unsigned ERR_W = TDC_W + 1;  // signed PFD code, 5 bits
  localparam int unsigned N_IN  = 4;          // filter inputs per node

  // loop filter
  localparam int unsigned KW_W   = 2;         // link weight Kw_i (unsigned integer)
  localparam int unsigned K_W    = 12;        // Kp / Ki width, unsigned fixed point
  localparam int unsigned K_FRAC = 8;         // fractional bits of Kp / Ki
  localparam int unsigned SUM_W  = 9;         // weighted error sum (Total_Err)

  // DCO
  localparam int unsigned NC     = 11;        // DCO counter width
  localparam int unsigned C_NOM  = 798;       // code giving 1250 clocks = 50 kHz at 62.5 MHz

  typedef logic signed [ERR_W-1:0] err_t;
  typedef logic signed [SUM_W-1:0] sum_t;
  typedef logic [K_W-1:0]          gain_t;
  typedef logic [KW_W-1:0]         weight_t;

  // filter input order, as in the node's error display: left, right, top, bottom
  typedef enum logic [1:0] {
    IN_LEFT   = 2'd0,
    IN_RIGHT  = 2'd1,
    IN_TOP    = 2'd2,
    IN_BOTTOM = 2'd3
  } link_e;

  // programmable values of one node, as loaded by the configuration chain (32 bits)
  typedef struct packed {
    weight_t [N_IN-1:0] kw;   // kw[IN_BOTTOM] is the most significant field
    gain_t              ki;
    gain_t              kp;
  } node_cfg_t;

  localparam int unsigned CFG_W = $bits(node_cfg_t);

endpackage
