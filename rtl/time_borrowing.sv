// time_borrowing -- clock for the stage after a protected flip-flop.
//
// When the protected stage corrects a timing error, its Q changes late in the
// cycle, and the logic after it may then deliver its result after the next
// rising edge. This block gives that next stage a longer transparent window
// for exactly that one cycle, without touching the system clock:
//
//   * an SR latch (output CM_SR) is set while CM AND CLK is 1, i.e. while
//     the master clock of the protected stage pulses during the high phase,
//     which only an error pulse can cause;
//   * a flip-flop clocked by CLKB = NOT CLK samples CM_SR at the falling
//     edge; its output Q resets the SR latch and selects the clock source;
//   * a multiplexer gives CLK_TB = CLK when Q = 0 and CLKDD = CLK AND CLKD
//     when Q = 1, CLKD being CLK through a delay buffer of BORROW.
//
// CLKDD rises BORROW later than CLK and falls with it, so a master latch
// enabled by NOT CLK_TB stays open BORROW after the rising edge. The select
// changes at the falling edge, while both mux inputs are 0, so CLK_TB does
// not glitch.
//
// Interface: rst (asynchronous reset of the flip-flop, active high), clk,
// cm (master clock of the protected stage), clk_tb. Timing: borrowing is
// armed by an error in the high phase of cycle k and applies to the rising
// edge that starts cycle k+1. The SR latch is reset-dominant, as a
// cross-coupled NOR latch is, so an error in cycle k+1 while Q is still 1 is
// not recorded: errors in two consecutive cycles are not covered. The SR
// latch is an intended latch.
//
// Labels and connections follow the document's drawing; BORROW and the
// reset polarity are this design's choice.
`timescale 1ns / 1ps
module time_borrowing #(
  parameter realtime BORROW = 2.0
) (
  input  logic rst,
  input  logic clk,
  input  logic cm,
  output logic clk_tb
);

  logic sr_set;  // CM AND CLK
  logic cm_sr;   // SR latch output
  logic clkb;    // inverted clock
  logic tb_q;    // "borrow in the next cycle"
  logic clkd;    // delayed clock
  logic clkdd;   // CLK AND CLKD

  assign sr_set = cm & clk;
  assign clkb   = ~clk;

  always_latch begin
    if (tb_q)        cm_sr = 1'b0;
    else if (sr_set) cm_sr = 1'b1;
  end

  always_ff @(posedge clkb or posedge rst) begin
    if (rst) tb_q <= 1'b0;
    else     tb_q <= cm_sr;
  end

  delay_buffer #(.DELAY(BORROW)) u_clkd (
    .a(clk),
    .y(clkd)
  );

  assign clkdd  = clk & clkd;
  assign clk_tb = tb_q ? clkdd : clk;

endmodule
