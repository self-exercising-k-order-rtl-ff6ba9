// cnsi: the expected-output generator of the self-exercising checker.
//
// During the test phase the comparator sees vectors of Hamming weight k and
// k-1 in turn, so its fault-free output alternates 0 and 1. CNSI is a toggle
// flip-flop that produces the matching sequence S = 0,1,0,1,... with S = 0
// while a weight-k vector is applied. It steps once per test vector, i.e. at
// twice the rate at which each generator register shifts.
// Timing: it toggles on the falling clock edge (start of precharge), when
// en (TEST) is high. rst_n (asynchronous, active low) sets S = 0, matching the
// generator's first vector, which has weight k.
module cnsi (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic s
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)  s <= 1'b0;
    else if (en) s <= ~s;
  end
endmodule
