// master_clock_generator_tb -- applies all four combinations of er and clk,
// in random order, and checks cm against Er OR NOT Clock. Self-checking.
`timescale 1ns / 1ps
module master_clock_generator_tb;
  logic er = 1'b0, clk = 1'b0;
  logic cm;
  int checks = 0, failures = 0;

  master_clock_generator dut (.er(er), .clk(clk), .cm(cm));

  initial begin
    #1000;
    $display("WATCHDOG expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 64; i++) begin
      {er, clk} = (i < 4) ? 2'(i) : 2'($urandom_range(0, 3));
      #1;
      // expected value from the truth table: only er=0, clk=1 gives 0
      exp = !(er == 1'b0 && clk == 1'b1);
      checks++;
      if (cm !== exp) begin
        failures++;
        $display("FAIL er=%b clk=%b cm=%b expected %b", er, clk, cm, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
