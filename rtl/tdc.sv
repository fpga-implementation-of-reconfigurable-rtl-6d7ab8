// tdc -- time-to-digital converter built as a digital chronometer.
//
// The converter counts the rising edges of its own clock (the TDC clock, whose period is
// the PFD resolution, 149.88 ns in the reference configuration) while MODE is high. When
// the measurement ends (`stop`, which the detector pulses as MODE falls) the count is
// presented on dout with a one-cycle `valid` pulse, one cycle later, and the counter is
// cleared. A stop with no MODE interval (coincident edges) reads 0. The count saturates
// at 2^W-1, which gives the flat ends of the detector's transfer characteristic.
//
// Because the TDC clock is not aligned with the start of the interval, an interval
// shorter than one period can still contain one clock edge and read 1; this +/-1 code
// noise, with the sign of the error, is the behaviour published for the
// counter-based converter. The counter, saturation and output register follow the
// published prototype; the width W = 4 is this design's choice (5-bit signed error).
module tdc #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mode,    // interval to be measured
  input  logic         stop,    // end of the measurement
  output logic [W-1:0] dout,    // unsigned duration in TDC clock periods
  output logic         valid    // one-cycle pulse when dout is updated
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      dout  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (stop) begin
        dout  <= cnt;
        valid <= 1'b1;
        cnt   <= '0;
      end else if (mode && cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
