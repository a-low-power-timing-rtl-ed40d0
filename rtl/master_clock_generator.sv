// master_clock_generator -- master-latch clock CM of the protected flip-flop.
//
// CM = Er OR (NOT Clock). While the clock is low CM is high and the master
// latch is transparent, as in any master-slave flip-flop. While the clock is
// high CM is low, except while an error pulse from the transition detector is
// present: then the master reopens while the slave is still transparent, and
// late data flow straight through to Q, correcting it in the same cycle.
//
// Interface: er (error pulse), clk (system clock), cm (master enable, the
// master latch is transparent while cm is 1). Timing: purely combinational.
//
// The gate structure follows the document.
`timescale 1ns / 1ps
module master_clock_generator (
  input  logic er,
  input  logic clk,
  output logic cm
);

  assign cm = er | ~clk;

endmodule
