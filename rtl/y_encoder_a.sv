// y_encoder_a: turns the current sensor's output into a two-rail pair for the
// self-exercising comparator built on design A.
//
// Design A is expected to draw a large current in one case only: evaluation
// phase with 1 <= weight < k. In the test phase the comparator alternates
// weight-k vectors (S = 0) and weight-(k-1) vectors (S = 1), so the
// fault-free sensor output is known at every moment: high in evaluation with
// S = 1, low otherwise. The encoder makes (Y0, Y1) a code word ((0,1) or
// (1,0)) exactly when the sensor agrees:
//   evaluation, test:   Y0 = not S, Y1 = BICS   -> (1,0) or (0,1) fault-free;
//                       a high sensor at weight k gives (1,1), a low one at
//                       weight k-1 gives (0,0)
//   precharge:          Y0 = 0,     Y1 = not BICS  -> (0,0) if current flows
//   evaluation, normal: Y0 = 0,     Y1 = 1 (the operand weight is unknown,
//                       so the sensor is not judged)
// Combinational. The four inputs and the two outputs are the document's; the
// function is derived from its fault-detection table for design A.
module y_encoder_a (
  input  logic test,
  input  logic clk,
  input  logic bics,
  input  logic s,
  output logic y0,
  output logic y1
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    y0 = test & clk & ~s;
    if (!clk)      y1 = ~bics;
    else if (test) y1 = bics;
    else           y1 = 1'b1;
  end
endmodule
