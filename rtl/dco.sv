// dco -- digitally controlled oscillator built from a preloaded counter.
//
// An NC-bit counter runs on the fast DCO clock. When it reaches 2^NC-1 (saturates) it is
// reloaded with the input code and a one-cycle `evt` pulse is produced, so the output
// period is (2^NC - code) DCO clock periods. The output clock `clk_out` is high for the
// first floor((2^NC - code)/2) clocks of each period; it is registered and rises one
// clock after `evt`. With the default NC = 11 and a 62.5 MHz clock, code 798 gives 1250 clocks
// per period, the 50 kHz nominal frequency, and one code step near it changes the
// frequency by about 40 Hz.
//
// The code comes from the filter in the TDC clock domain. It passes two synchroniser
// flip-flops and is taken only when both agree, so a word caught while changing is never
// used; it is then applied at the next reload, never inside a period. The counter
// principle and the period formula follow the published prototype; the duty cycle, the clock-domain
// crossing and the reset values (the counter starts at the reset code) are this design's.
module dco #(
  parameter int unsigned NC       = adpll_pkg::NC,
  parameter int unsigned RST_CODE = adpll_pkg::C_NOM
) (
  input  logic          clk,       // DCO clock (62.5 MHz in the reference setup)
  input  logic          rst_n,
  input  logic [NC-1:0] code,      // control word, may be asynchronous to clk
  output logic          clk_out,   // generated clock
  output logic          evt        // one-cycle pulse at each period start
);
  logic [NC-1:0] s1, s2, code_ok, cnt, hi_end;
  logic [NC:0]   span;

  assign span = (NC+1)'(1 << NC) - {1'b0, code_ok};   // period of the next cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1      <= NC'(RST_CODE);
      s2      <= NC'(RST_CODE);
      code_ok <= NC'(RST_CODE);
    end else begin
      s1 <= code;
      s2 <= s1;
      if (s1 == s2) code_ok <= s2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= NC'(RST_CODE);
      hi_end  <= NC'(RST_CODE) + NC'(((1 << NC) - RST_CODE) / 2);
      evt     <= 1'b0;
      clk_out <= 1'b0;
    end else begin
      evt     <= 1'b0;
      clk_out <= (cnt < hi_end);
      if (cnt == '1) begin
        cnt    <= code_ok;
        hi_end <= code_ok + NC'(span >> 1);
        evt    <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
