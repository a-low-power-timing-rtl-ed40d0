// master_slave_ff_tb -- exercises the master-slave flip-flop three ways:
//   1. reset clears q;
//   2. with clk_m = ~clk and clk_s = clk it behaves as a rising-edge
//      flip-flop: q takes d at the edge and ignores d while clk is high;
//   3. a pulse on clk_m while clk is high makes the flip-flop transparent:
//      q follows the late d at once, and keeps it after the pulse.
// Expected values come from a reference variable updated at the edges.
`timescale 1ns / 1ps
module master_slave_ff_tb;
  localparam realtime T = 10.0;

  logic rst = 1'b1, clk = 1'b0, d = 1'b0, pulse = 1'b0;
  logic clk_m, q;
  logic ref_q;
  int checks = 0, failures = 0;

  assign clk_m = ~clk | pulse;

  master_slave_ff dut (.rst(rst), .clk_m(clk_m), .clk_s(clk), .d(d), .q(q));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $realtime, got, exp);
    end
  endtask

  initial begin
    #(T * 200);
    $display("WATCHDOG expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1'b1;
    #(T / 4) check(q, 1'b0, "reset");
    clk = 1'b1;
    #(T / 4) check(q, 1'b0, "reset held at edge");
    clk = 1'b0;
    #(T / 4) rst = 1'b0;
    ref_q = 1'b0;
    #(T / 4);
    for (int i = 0; i < 100; i++) begin
      // low phase: new data
      d = 1'($urandom_range(0, 1));
      #(T / 4);
      clk = 1'b1;              // rising edge
      ref_q = d;
      #(T / 8) check(q, ref_q, "edge capture");
      if (i % 3 == 2) begin
        // late data inside the high phase, corrected by a master pulse
        d = ~d;
        #(T / 8) check(q, ref_q, "late data not yet taken");
        pulse = 1'b1;
        ref_q = d;
        #(T / 20) check(q, ref_q, "transparent during pulse");
        pulse = 1'b0;
        #(T / 20) check(q, ref_q, "held after pulse");
        #(T / 8);
      end else begin
        // data change in the high phase without pulse is ignored
        d = ~d;
        #(T / 4) check(q, ref_q, "hold in high phase");
        #(T / 8);
      end
      clk = 1'b0;
      #(T / 8) check(q, ref_q, "hold in low phase");
      #(T / 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
