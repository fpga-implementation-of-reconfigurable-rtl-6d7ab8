// bbpfd -- bang-bang phase-frequency detector, written as an event-driven state machine.
//
// Inputs are one-cycle event pulses marking rising edges of the "plus" clock (a_rise)
// and the "minus" clock (b_rise). From the idle state, the first event to arrive starts
// an interval: MODE goes high and SIGN records which input led (0: plus input led, so the
// phase error plus-minus is positive; 1: minus input led). MODE stays high until the
// event of the other input arrives. Further events of the leading input while MODE is
// high are ignored. Events of both inputs in the same cycle give a zero-length interval
// (MODE stays low) and SIGN is cleared. `done` pulses for one cycle when a comparison
// ends, that is in the cycle MODE falls, or one cycle after coincident events.
//
// The published prototype gives the function (sign and interval of the phase error, with the
// duration of MODE equal to the absolute error) and says the detector is described at
// behavioural level as a finite-state automaton driven by rising edges. The states and
// the handling of repeated events are this design's choice.
module bbpfd (
  input  logic clk,      // TDC clock
  input  logic rst_n,
  input  logic a_rise,   // event on the plus input
  input  logic b_rise,   // event on the minus input
  output logic sign,     // 1 when the minus input led (negative error)
  output logic mode,     // high for the duration of the phase error
  output logic done      // one-cycle pulse: comparison finished
);
  typedef enum logic [1:0] {IDLE, A_LEAD, B_LEAD} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      sign  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (a_rise && b_rise) begin sign <= 1'b0; done <= 1'b1; end
          else if (a_rise) begin state <= A_LEAD; sign <= 1'b0; end
          else if (b_rise) begin state <= B_LEAD; sign <= 1'b1; end
        end
        A_LEAD: if (b_rise) begin state <= IDLE; done <= 1'b1; end
        B_LEAD: if (a_rise) begin state <= IDLE; done <= 1'b1; end
        default: state <= IDLE;
      endcase
    end
  end

  assign mode = (state != IDLE);
endmodule
