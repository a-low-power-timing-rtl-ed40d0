// timing_error -- three flip-flop stages with timing-error correction on the
// middle one and time borrowing on the last.
//
//   d -> [FF1] -q1-> (logic 1, outside) -d2-> [FF2] -q2-> (logic 2, outside)
//        -d3-> [FF3] -> q3
//
// FF1 is a plain master-slave flip-flop. FF2 is protected: a transition
// detector watches d2, and its error pulse reopens FF2's master latch
// through the master clock generator (CM = Er OR NOT CLK) whenever d2 changes
// while CLK is high. Data that arrive late, but while CLK is still high, thus
// replace the wrong Q within the same cycle. Because FF2's Q then changes
// late, the time borrowing circuit holds FF3's master open for BORROW after
// the next rising edge (FF3's master enable is NOT CLK_TB).
//
// The combinational logic between the stages is the user's and is not part
// of this block: q1/q2 leave the block and d2/d3 come back in.
//
// Timing rules: the logic before FF2 must take more than half a clock
// period, so that its normal transitions fall in the low phase, where an
// error pulse changes nothing; a late transition is corrected if it lands in
// the high phase of the next cycle. The logic after FF2, plus the lateness of
// q2, must fit in one period plus BORROW. Errors in two consecutive cycles
// are not covered by the time borrowing circuit.
//
// Ports: rst (active high), clk, d, d2, d3 inputs; q1, q2, q3, er, cm,
// clk_tb outputs. The structure follows the document; widths (one bit),
// reset and the delay values are this design's choices.
`timescale 1ns / 1ps
module timing_error #(
  parameter realtime PULSE  = 0.5,
  parameter realtime BORROW = 2.0
) (
  input  logic rst,
  input  logic clk,
  input  logic d,
  input  logic d2,
  input  logic d3,
  output logic q1,
  output logic q2,
  output logic q3,
  output logic er,
  output logic cm,
  output logic clk_tb
);

  logic clk_n;     // master enable of FF1
  logic clk_tb_n;  // master enable of FF3

  assign clk_n    = ~clk;
  assign clk_tb_n = ~clk_tb;

  master_slave_ff u_ff1 (
    .rst(rst), .clk_m(clk_n), .clk_s(clk), .d(d), .q(q1)
  );

  transition_detector #(.PULSE(PULSE)) u_td (
    .in_d(d2), .er(er)
  );

  master_clock_generator u_mcg (
    .er(er), .clk(clk), .cm(cm)
  );

  master_slave_ff u_ff2 (
    .rst(rst), .clk_m(cm), .clk_s(clk), .d(d2), .q(q2)
  );

  time_borrowing #(.BORROW(BORROW)) u_tb (
    .rst(rst), .clk(clk), .cm(cm), .clk_tb(clk_tb)
  );

  master_slave_ff u_ff3 (
    .rst(rst), .clk_m(clk_tb_n), .clk_s(clk), .d(d3), .q(q3)
  );

endmodule
