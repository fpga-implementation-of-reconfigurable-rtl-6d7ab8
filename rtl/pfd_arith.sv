// pfd_arith -- arithmetic block of the phase detector.
//
// Combines the unsigned TDC magnitude with the bang-bang SIGN into a signed
// two's-complement phase error: +dout when SIGN is 0, -dout when SIGN is 1. The result is
// registered when `in_valid` pulses, and `out_valid` follows one cycle later. The
// function is the published prototype's; the register stage is this design's choice.
module pfd_arith #(
  parameter int unsigned W = 4               // magnitude width; error is W+1 bits
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sign,
  input  logic [W-1:0]        dout,
  input  logic                in_valid,
  output logic signed [W:0]   err,
  output logic                out_valid
);
  logic signed [W:0] mag;
  assign mag = signed'({1'b0, dout});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) err <= sign ? -mag : mag;
    end
  end
endmodule
