// bics: behavioural model of the built-in current sensor (an analog circuit
// from the literature; this is a simulation model, not synthesizable logic).
//
// The sensor sits in the supply path of the comparator and raises out while
// the supply current exceeds THRESHOLD_UA. The document places the threshold
// at 1 mA, between the ~10 uA of a circuit without a Vdd-to-ground path and
// the ~3 mA of one with a path. The output follows the current after
// DETECT_NS (the sensor cited is a 2 ns design); both edges use that delay.
// Ports: idd_ua (sensed current, microamperes), out (high = above threshold).
module bics #(
  parameter int unsigned THRESHOLD_UA = 1000,
  parameter int unsigned DETECT_NS    = 2
) (
  input  int unsigned idd_ua,
  output logic        out
);
  timeunit 1ns; timeprecision 1ps;

  assign #(DETECT_NS) out = (idd_ua > THRESHOLD_UA);
endmodule
