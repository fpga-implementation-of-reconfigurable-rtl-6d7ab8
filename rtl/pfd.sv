// pfd -- phase-frequency detector between two clocks of the network.
//
// Structure as in the published prototype: a bang-bang detector (bbpfd) gives the sign of the phase
// error and a MODE pulse whose length is its magnitude; a chronometer TDC (tdc) measures
// MODE in TDC clock periods; an arithmetic block (pfd_arith) forms the signed error.
// err = phase(clk_p) - phase(clk_m), positive when the plus clock leads, in units of
// one TDC clock period, range -(2^W-1) .. 2^W-1 (-15..15 for W = 4).
//
// Both clocks are asynchronous to clk (the TDC clock); edge_sync resynchronises them and
// marks their rising edges. `err` is updated once per comparison, with a one-cycle
// `valid` pulse, four cycles after the lagging edge is seen. A sign register (this
// design's choice) holds SIGN of the finished comparison while the next one may start.
// In the network each PFD is shared by two neighbouring nodes: the node on the minus side
// uses err, the node on the plus side uses -err.
module pfd #(
  parameter int unsigned W = 4
) (
  input  logic              clk,     // TDC clock
  input  logic              rst_n,
  input  logic              clk_p,   // plus input (reference or upstream neighbour)
  input  logic              clk_m,   // minus input
  output logic signed [W:0] err,
  output logic              valid
);
  logic p_rise, m_rise, sign, mode, done, sign_q, tdc_valid;
  logic [W-1:0] dout;

  edge_sync u_sync_p (.clk, .rst_n, .d(clk_p), .rise(p_rise));
  edge_sync u_sync_m (.clk, .rst_n, .d(clk_m), .rise(m_rise));

  bbpfd u_bb (.clk, .rst_n, .a_rise(p_rise), .b_rise(m_rise), .sign, .mode, .done);

  tdc #(.W(W)) u_tdc (.clk, .rst_n, .mode, .stop(done), .dout, .valid(tdc_valid));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sign_q <= 1'b0;
    else if (done) sign_q <= sign;
  end

  pfd_arith #(.W(W)) u_arith (.clk, .rst_n, .sign(sign_q), .dout, .in_valid(tdc_valid),
                              .err, .out_valid(valid));
endmodule
