// master_slave_ff -- flip-flop made of a master latch and a slave latch with
// separate enables.
//
// The master latch is transparent while clk_m is 1, the slave latch while
// clk_s is 1. Driven with clk_m = ~CLK and clk_s = CLK it is an ordinary
// rising-edge flip-flop. Keeping the two enables apart lets the error
// correction reopen the master while CLK is high (clk_m = CM), so that both
// latches are transparent and late data reach Q; and lets the time borrowing
// circuit hold the master open for a while after the rising edge
// (clk_m = ~CLK_TB).
//
// Interface: rst (asynchronous, active high, clears both latches), clk_m,
// clk_s, d, q. Timing: zero-delay latches.
//
// The latches are intended: this block is the level-sensitive storage of the
// scheme, so latch warnings on it are expected. The split into master and
// slave follows the document; the reset is this design's addition.
`timescale 1ns / 1ps
module master_slave_ff (
  input  logic rst,
  input  logic clk_m,
  input  logic clk_s,
  input  logic d,
  output logic q
);

  logic m_q;  // master latch output

  always_latch begin
    if (rst)        m_q = 1'b0;
    else if (clk_m) m_q = d;
  end

  always_latch begin
    if (rst)        q = 1'b0;
    else if (clk_s) q = m_q;
  end

endmodule
