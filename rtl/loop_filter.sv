// loop_filter -- weighted error summation and proportional-integral filter of one node.
//
// Each of the N_IN phase errors (left, right, top, bottom neighbour) is held in a register
// when its detector reports a new value, multiplied by its programmable link weight Kw_i
// (0 removes the link, 1 uses it), and the products are summed into total_err. On each
// `tick` the PI filter of transfer function H(z) = Kp + Ki / (1 - z^-1) is evaluated:
//   I(n)    = I(n-1) + Ki * total_err(n)
//   y(n)    = Kp * total_err(n) + I(n)
//   code(n) = C_NOM + floor(y(n))
// Kp and Ki are unsigned fixed-point numbers with K_FRAC fractional bits (Kp = 1/256 is
// 1, Ki = 4 is 1024). I(n) is kept with the same fractional bits and clamped to
// +/-2^NC; code is clamped to 0 .. 2^NC-2, so the DCO period is never shorter than two
// clocks. A positive error (neighbour ahead) raises the code, which shortens the DCO
// period.
//
// Timing: code and code_valid are registered and appear one cycle after `tick`. The
// weighted errors and total_err follow the held errors combinationally. The weight/sum/PI
// structure and the programmability of all coefficients are the published prototype's; the number
// formats, holding registers, clamping and the nominal-code offset are this design's.
module loop_filter
  import adpll_pkg::*;
#(
  parameter int unsigned NC_P    = NC,
  parameter int unsigned C_NOM_P = C_NOM
) (
  input  logic                 clk,        // TDC clock
  input  logic                 rst_n,
  input  err_t [N_IN-1:0]      err,        // phase errors, index link_e
  input  logic [N_IN-1:0]      err_valid,  // one-cycle update pulses
  input  node_cfg_t            cfg,        // Kp, Ki, Kw_i
  input  logic                 tick,       // evaluate the filter
  output logic signed [ERR_W+KW_W:0] werr [N_IN], // errors after weighting
  output sum_t                 total_err,
  output logic [NC_P-1:0]      code,
  output logic                 code_valid
);
  localparam int ACC_W = 40;
  localparam logic signed [ACC_W-1:0] I_MAX = ACC_W'(longint'(1) << (NC_P + K_FRAC));
  localparam logic signed [ACC_W-1:0] CODE_MAX = ACC_W'((longint'(1) << NC_P) - 2);

  err_t [N_IN-1:0] held;
  logic signed [ACC_W-1:0] integ, integ_nxt, y, c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held <= '0;
    else
      for (int i = 0; i < N_IN; i++)
        if (err_valid[i]) held[i] <= err[i];
  end

  always_comb begin
    logic signed [SUM_W-1:0] s;
    s = '0;
    for (int i = 0; i < N_IN; i++) begin
      werr[i] = (ERR_W+KW_W+1)'(held[i] * signed'({1'b0, cfg.kw[i]}));
      s = s + SUM_W'(werr[i]);
    end
    total_err = s;
  end

  always_comb begin
    integ_nxt = integ + ACC_W'(total_err) * ACC_W'(signed'({1'b0, cfg.ki}));
    if (integ_nxt > I_MAX)       integ_nxt = I_MAX;
    else if (integ_nxt < -I_MAX) integ_nxt = -I_MAX;
    y = (ACC_W'(total_err) * ACC_W'(signed'({1'b0, cfg.kp})) + integ_nxt) >>> K_FRAC;
    c = y + ACC_W'(C_NOM_P);
    if (c < 0)             c = '0;
    else if (c > CODE_MAX) c = CODE_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ      <= '0;
      code       <= NC_P'(C_NOM_P);
      code_valid <= 1'b0;
    end else begin
      code_valid <= tick;
      if (tick) begin
        integ <= integ_nxt;
        code  <= c[NC_P-1:0];
      end
    end
  end
endmodule
