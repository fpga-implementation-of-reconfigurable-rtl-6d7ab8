// edge_sync -- brings an asynchronous clock-like signal into the local clock domain and
// marks its rising edges.
//
// Two flip-flops resynchronise the input; a third holds the previous synchronised value
// so that `rise` is a one-cycle pulse on each 0->1 transition. Latency from the input
// edge to `rise` is two to three local clock cycles. This helper is a design choice: it
// makes the event-driven detectors of the network synchronous to the TDC clock.
module edge_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic d,      // asynchronous input
  output logic rise    // one-cycle pulse per rising edge of d
);
  logic [2:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[1:0], d};
  end

  assign rise = sh[1] & ~sh[2];
endmodule
