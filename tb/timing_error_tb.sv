// timing_error_tb -- end-to-end test of the three-stage timing-error
// tolerant pipeline at its default parameters (PULSE 0.5 ns, BORROW 2 ns).
//
// The clock period is 10 ns. Random data enter stage 1 every cycle. The logic
// between the stages is modelled by comb_path_model (an inverter with a
// chosen delay):
//   * logic 1 (q1 -> d2) normally takes 5.5 .. 9 ns, so its transitions land
//     in the low phase; in randomly chosen cycles (never two in a row) it
//     takes 10.6 .. 12.4 ns, so the data reach FF2 after the rising edge: a
//     timing error, to be corrected in the same high phase;
//   * logic 2 (q2 -> d3) takes 9 ns, so when q2 was corrected late, d3
//     arrives up to 1.4 ns after the next rising edge and FF3 must borrow.
// Reference: with both paths inverting, q1 = d(k), q2 = ~d(k-1) and
// q3 = d(k-2) in cycle k, checked 0.5 ns before each falling edge, so a
// corrected error must be repaired within the cycle it occurred in.
//
// Mechanisms counted (each must happen at least once): transitions in the
// low phase (harmless error pulses), timing errors seen on q2 and corrected
// in the same cycle, borrow cycles on clk_tb, and d3 arriving after the
// rising edge and still captured by FF3.
`timescale 1ns / 1ps
module timing_error_tb;
  localparam realtime T      = 10.0;
  localparam int      CYCLES = 400;

  logic rst = 1'b1, clk = 1'b0, d = 1'b0;
  logic d2, d3, q1, q2, q3, er, cm, clk_tb;
  realtime delay1 = 7.0, delay2 = 9.0;

  int checks = 0, failures = 0;
  int n_low_er = 0, n_high_er = 0, n_err_corrected = 0, n_borrow = 0, n_late_d3 = 0;
  logic dval [0:CYCLES+8];
  bit   late  [0:CYCLES+8];

  timing_error dut (
    .rst(rst), .clk(clk), .d(d), .d2(d2), .d3(d3),
    .q1(q1), .q2(q2), .q3(q3), .er(er), .cm(cm), .clk_tb(clk_tb)
  );

  comb_path_model u_logic1 (.in_d(q1), .delay(delay1), .out_q(d2));
  comb_path_model u_logic2 (.in_d(q2), .delay(delay2), .out_q(d3));

  task automatic check(input logic got, input logic exp, input string what, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s cycle %0d at %0t: got %b expected %b", what, k, $realtime, got, exp);
    end
  endtask

  // error pulses, classified by clock phase at their start
  always @(posedge er) begin
    if (!rst) begin
      if (clk) n_high_er++;
      else     n_low_er++;
    end
  end

  // d3 changing while clk is high but clk_tb is still low: borrowed time
  always @(d3) begin
    if (!rst && clk && !clk_tb) n_late_d3++;
  end

  initial begin
    #(T * (CYCLES + 20));
    $display("WATCHDOG expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev_late;
    logic q2_early;
    // reset with the clock running
    repeat (3) begin
      #(T / 2) clk = 1'b1;
      #(T / 2) clk = 1'b0;
    end
    rst = 1'b0;
    prev_late = 1'b0;
    for (int k = 0; k < CYCLES; k++) begin
      // low phase of cycle k-1: choose the delay of logic 1 for the data
      // that FF1 takes at edge k
      late[k] = !prev_late && (k > 4) && ($urandom_range(0, 3) == 0);
      prev_late = late[k];
      delay1 = late[k] ? T + 0.6 + 0.2 * $urandom_range(0, 9) : 5.5 + 0.5 * $urandom_range(0, 7);
      #(T / 2 - 1.0);
      dval[k] = d;
      #1.0;
      clk = 1'b1;                              // rising edge k
      #0.1;
      q2_early = q2;
      if (clk_tb == 1'b0) n_borrow++;
      #0.9;
      d = 1'($urandom_range(0, 1));            // next data for FF1
      #(T / 2 - 1.5);                          // 0.5 ns before the falling edge
      if (k >= 4) begin
        check(q1, dval[k], "q1", k);
        check(q2, ~dval[k-1], "q2", k);
        check(q3, dval[k-2], "q3", k);
        if (late[k-1] && dval[k-1] != dval[k-2]) begin
          // FF2 took the stale value at the edge and must have corrected it
          checks++;
          if (q2_early === ~dval[k-1]) begin
            failures++;
            $display("FAIL cycle %0d: late data already present at the edge", k);
          end else if (q2 === ~dval[k-1]) begin
            n_err_corrected++;
          end
        end
      end
      #0.5;
      clk = 1'b0;                              // falling edge
    end
    $display("low-phase transitions %0d, high-phase error pulses %0d, errors corrected %0d, borrow cycles %0d, late d3 captured %0d",
             n_low_er, n_high_er, n_err_corrected, n_borrow, n_late_d3);
    checks += 5;
    if (n_low_er == 0)        begin failures++; $display("FAIL no low-phase transition"); end
    if (n_high_er == 0)       begin failures++; $display("FAIL no high-phase error pulse"); end
    if (n_err_corrected == 0) begin failures++; $display("FAIL no timing error corrected"); end
    if (n_borrow == 0)        begin failures++; $display("FAIL no borrow cycle"); end
    if (n_late_d3 == 0)       begin failures++; $display("FAIL no late d3 captured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
