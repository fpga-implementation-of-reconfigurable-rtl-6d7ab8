// cfg_chain -- serial-to-parallel programming register.
//
// New programmable values are shifted in one bit per clock while `shift` is high
// (sdi enters at bit 0 and moves towards bit W-1, so the word is sent most significant
// bit first). The shadow register does not affect the design. A `load` pulse copies the
// whole shadow word into the active register `q` in one clock, so every coefficient of
// the network changes at the same moment; this is what allows a running network to be
// switched from one configuration to another. `sdo` is the last shadow bit, for chaining.
// Reset clears the shadow word and sets `q` to RST_VAL. The serial/parallel scheme is the
// published prototype's; the pin set and bit order are this design's.
module cfg_chain #(
  parameter int unsigned W       = 32,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sdi,
  input  logic         shift,
  input  logic         load,
  output logic         sdo,
  output logic [W-1:0] q
);
  logic [W-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0;
      q  <= RST_VAL;
    end else begin
      if (shift) sh <= {sh[W-2:0], sdi};
      if (load)  q  <= sh;
    end
  end

  assign sdo = sh[W-1];
endmodule
