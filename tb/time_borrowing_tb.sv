// time_borrowing_tb -- drives a clock and a master-clock signal
// cm = ~clk | err, where err is a short pulse placed in the high phase of
// randomly chosen cycles (never two in a row). Checks that:
//   * in the cycle after an error, clk_tb rises BORROW after clk and falls
//     with it;
//   * in every other cycle clk_tb equals clk;
//   * clk_tb has no glitch: rising edges are at least T - BORROW apart.
// The expected borrow cycles come from a list kept by the testbench.
`timescale 1ns / 1ps
module time_borrowing_tb;
  localparam realtime T      = 10.0;
  localparam realtime BORROW = 2.0;
  localparam int      CYCLES = 120;

  logic rst = 1'b1, clk = 1'b0, err = 1'b0;
  logic cm, clk_tb;
  int checks = 0, failures = 0, borrows = 0;
  bit borrow_next = 1'b0;
  realtime t_clk_rise, t_tb_rise = -100.0;

  assign cm = ~clk | err;

  time_borrowing dut (.rst(rst), .clk(clk), .cm(cm), .clk_tb(clk_tb));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $realtime, got, exp);
    end
  endtask

  always @(posedge clk_tb) begin
    checks++;
    if ($realtime - t_tb_rise < T - BORROW - 0.01) begin
      failures++;
      $display("FAIL double clk_tb edge at %0t", $realtime);
    end
    t_tb_rise = $realtime;
  end

  initial begin
    #(T * (CYCLES + 20));
    $display("WATCHDOG expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit borrow_now, err_now;
    // reset and two idle cycles to clear the SR latch's power-up state
    repeat (3) begin
      #(T / 2) clk = 1'b1;
      #(T / 2) clk = 1'b0;
    end
    rst = 1'b0;
    repeat (2) begin
      #(T / 2) clk = 1'b1;
      #(T / 2) clk = 1'b0;
    end
    for (int i = 0; i < CYCLES; i++) begin
      borrow_now  = borrow_next;
      err_now     = !borrow_now && ($urandom_range(0, 2) == 0);
      borrow_next = err_now;
      #(T / 2);
      clk = 1'b1;
      t_clk_rise = $realtime;
      #(BORROW / 2) check(clk_tb, borrow_now ? 1'b0 : 1'b1, "clk_tb early high phase");
      #(BORROW / 2 + 0.2) check(clk_tb, 1'b1, "clk_tb after borrow");
      if (borrow_now) begin
        borrows++;
        checks++;
        if (t_tb_rise - t_clk_rise < BORROW - 0.01 || t_tb_rise - t_clk_rise > BORROW + 0.01) begin
          failures++;
          $display("FAIL borrow delay %0t", t_tb_rise - t_clk_rise);
        end
      end
      if (err_now) begin
        err = 1'b1;
        #0.5 err = 1'b0;
      end
      #(T / 2 - BORROW - 0.2 - (err_now ? 0.5 : 0.0));
      clk = 1'b0;
      #0.1 check(clk_tb, 1'b0, "clk_tb falls with clk");
    end
    checks++;
    if (borrows == 0) begin
      failures++;
      $display("FAIL no borrow cycle exercised");
    end
    $display("borrow cycles: %0d", borrows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
