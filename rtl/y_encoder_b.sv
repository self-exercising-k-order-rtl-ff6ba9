// y_encoder_b: turns the current sensor's output into a two-rail pair for the
// self-exercising comparator built on design B.
//
// Fault-free, design B draws no static current in the test phase, so the
// sensor must stay low there. The pair is Y0 = TEST and Y1 = BICS or not
// TEST: in the test phase (1,0) while the sensor is low and the non-code word
// (1,1) when it reports current; in normal operation it is fixed at (0,1), the
// sensor not being judged (a run of mismatching operands may leave current
// flowing through the precharge phase, see kcomparator_b).
// Combinational. The connections (TEST to Y0; TEST-bar and BICS into one
// gate giving Y1) are the document's; the gate function is chosen here.
module y_encoder_b (
  input  logic test,
  input  logic bics,
  output logic y0,
  output logic y1
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    y0 = test;
    y1 = bics | ~test;
  end
endmodule
