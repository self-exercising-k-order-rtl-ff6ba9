// operand_xor: the row of XOR gates in front of a k-order comparator.
//
// Each difference line is X_i = A_i xor B_i, so the number of high X lines is
// the Hamming distance between the two operands, which the comparator
// thresholds against k. Purely combinational, no clock.
// Ports: a, b (N-bit operands), x (N-bit difference lines).
module operand_xor #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  timeunit 1ns; timeprecision 1ps;

  assign x = a ^ b;
endmodule
