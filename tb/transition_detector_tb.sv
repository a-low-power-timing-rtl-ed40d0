// transition_detector_tb -- drives random rising and falling edges into the
// transition detector and checks that er is 0 while the input is stable, 1
// right after each edge and until just before PULSE, and 0 again after PULSE.
// The edge-to-edge pulse width is also measured. Self-checking.
`timescale 1ns / 1ps
module transition_detector_tb;
  localparam realtime PULSE = 0.5;

  logic in_d = 1'b0;
  logic er;
  int checks = 0, failures = 0;
  realtime t_rise;

  transition_detector dut (.in_d(in_d), .er(er));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $realtime, got, exp);
    end
  endtask

  // pulse width measured on every pulse
  always @(posedge er) t_rise = $realtime;
  always @(negedge er) begin
    checks++;
    if (($realtime - t_rise) < PULSE - 0.01 || ($realtime - t_rise) > PULSE + 0.01) begin
      failures++;
      $display("FAIL pulse width %0t", $realtime - t_rise);
    end
  end

  initial begin
    #200;
    $display("WATCHDOG expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int edges = 0;
    #2;
    check(er, 1'b0, "idle");
    for (int i = 0; i < 60; i++) begin
      if ($urandom_range(0, 3) != 0) begin
        in_d = ~in_d;
        edges++;
        #0.05 check(er, 1'b1, in_d ? "rise start" : "fall start");
        #(PULSE - 0.15) check(er, 1'b1, "pulse end");
        #0.2 check(er, 1'b0, "after pulse");
      end else begin
        #0.05 check(er, 1'b0, "no edge");
        #(PULSE + 0.05);
      end
      #($urandom_range(1, 10) * 0.1) check(er, 1'b0, "stable");
    end
    checks++;
    if (edges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
