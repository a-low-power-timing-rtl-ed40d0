// delay_buffer_tb -- checks that the delay buffer model reproduces each input
// change DELAY later and not earlier. Random input levels, changes spaced
// wider than DELAY. Self-checking; prints TB_RESULT.
`timescale 1ns / 1ps
module delay_buffer_tb;
  localparam realtime DELAY = 0.5;

  logic a = 1'b0;
  logic y;
  int checks = 0, failures = 0;

  delay_buffer dut (.a(a), .y(y));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $realtime, got, exp);
    end
  endtask

  initial begin
    #100;
    $display("WATCHDOG expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic old_v, new_v;
    #2;
    check(y, 1'b0, "settled");
    for (int i = 0; i < 40; i++) begin
      old_v = a;
      new_v = ~old_v;
      a = new_v;
      #(DELAY - 0.1);
      check(y, old_v, "before delay");
      #0.2;
      check(y, new_v, "after delay");
      #(0.3 + ($urandom_range(0, 9) * 0.1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
