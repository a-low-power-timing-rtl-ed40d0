// transition_detector -- error pulse on every edge of a flip-flop data input.
//
// The input is inverted and delayed by a delay buffer. For PULSE after an
// edge the delayed, inverted copy still carries the old value, so it equals
// the new input: AND(in, delayed ~in) is high for PULSE after a rising edge,
// AND(~in, ~delayed ~in) is high for PULSE after a falling edge, and the OR
// of the two is the error pulse er. With the input stable both ANDs are 0.
//
// Interface: in_d (data input of the protected flip-flop), er (error pulse).
// Timing: er rises with the data edge (zero gate delay in this model) and
// lasts PULSE. PULSE must be at least the set-up time of the master latch
// it reopens, and shorter than the minimum time between data edges.
//
// The structure (inverter, delay buffer, two ANDs, OR) follows the document;
// the pulse width is this design's choice.
`timescale 1ns / 1ps
module transition_detector #(
  parameter realtime PULSE = 0.5
) (
  input  logic in_d,
  output logic er
);

  logic in_n;      // inverted input
  logic in_n_dly;  // inverted input after the delay buffer
  logic rise;      // rising-edge pulse
  logic fall;      // falling-edge pulse

  assign in_n = ~in_d;

  delay_buffer #(.DELAY(PULSE)) u_dly (
    .a(in_n),
    .y(in_n_dly)
  );

  assign rise = in_d & in_n_dly;
  assign fall = ~in_d & ~in_n_dly;
  assign er   = rise | fall;

endmodule
