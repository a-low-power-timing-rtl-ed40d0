// delay_buffer -- behavioural model of a delay buffer cell (not synthesizable
// logic: a delay element is a sized cell chosen for its propagation delay).
//
// The output follows the input after DELAY. The timing-error scheme uses two
// of these: one inside the transition detector, where the delay sets the width
// of the error pulse, and one in the time borrowing circuit, where it delays
// the clock to CLKD and so sets how long the next stage may borrow.
//
// Interface: a (in), y (out). Timing: transport of every change of a to y
// after DELAY; like a real buffer, pulses shorter than DELAY are swallowed
// (inertial delay of a continuous assignment).
//
// The document names the buffer and says what it is for; the value of DELAY
// is this design's choice (0.5 ns), to be replaced by the delay of the cell
// used in silicon.
`timescale 1ns / 1ps
module delay_buffer #(
  parameter realtime DELAY = 0.5
) (
  input  logic a,
  output logic y
);

  assign #(DELAY) y = a;

endmodule
