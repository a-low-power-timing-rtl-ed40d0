// comb_path_model -- testbench stand-in for the combinational logic between
// two pipeline flip-flops. It computes NOT in_d and delivers each result
// after the delay that is on `delay` at the moment the input changes, so the
// testbench can make any single path fast, slow or late. Transport delay:
// every input change produces exactly one output change. Not synthesizable.
`timescale 1ns / 1ps
module comb_path_model (
  input  logic    in_d,
  input  realtime delay,
  output logic    out_q
);

  initial out_q = 1'b1;

  always @(in_d) begin
    automatic logic    v = ~in_d;
    automatic realtime w = delay;
    fork
      begin
        #(w);
        out_q = v;
      end
    join_none
  end

endmodule
