// freq_div -- divide-by-M of the generated clock.
//
// Counts the periods of the DCO output (marked by the DCO's one-cycle `evt` pulse) modulo
// M and produces a clock whose period is M DCO periods. The output is high for the first
// M of the 2M half periods of the DCO clock (for odd M it rises and falls on DCO clock
// edges), so its rising edge follows a DCO rising edge; with M = 1 it is the DCO clock
// delayed by one clock. The output is registered (one DCO clock of latency) so that it
// never glitches; neighbours resynchronise it. The divider is part of the published node
// structure; its ratio is not given there and M = 1 is this design's default, matching
// node clocks that run at the reference rate.
module freq_div #(
  parameter int unsigned M = 1
) (
  input  logic clk,        // DCO clock
  input  logic rst_n,
  input  logic in_clk,     // DCO output clock
  input  logic in_evt,     // DCO period start
  output logic out_clk     // divided clock
);
  localparam int unsigned KW = (M > 1) ? $clog2(M) : 1;
  logic [KW-1:0] k;        // index of the current DCO period within the output period
  logic [KW+1:0] half;     // index of the current half period, 0 .. 2M-1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) k <= '0;
    else if (in_evt) k <= (k == KW'(M - 1)) ? '0 : k + 1'b1;
  end

  // in_clk is high in the first half of each DCO period
  assign half = {1'b0, k, 1'b0} + (KW+2)'(!in_clk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_clk <= 1'b0;
    else        out_clk <= (half < (KW+2)'(M));
  end
endmodule
