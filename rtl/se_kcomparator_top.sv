// se_kcomparator_top: the two proposed self-exercising k-order comparators,
// side by side.
//
// Both compare N-bit operands against the order K and check themselves the
// same way: a built-in generator of weight-K / weight-(K-1) vectors, a toggle
// flip-flop with the expected result, a two-rail output pair (z0, z1) from
// the comparator's logic value, and a second pair (y0, y1) from a built-in
// current sensor on the comparator's supply. They differ in the comparator:
//   design A (a_*) draws static current only in evaluation with
//            1 <= weight < K, and the sensor is expected to see it then;
//   design B (b_*) limits that current to a short pulse after the rising
//            clock edge, and the sensor must never fire in the test phase.
// Each has its own clock, reset, TEST and operand inputs and its own outputs.
// See se_kcomparator_a / se_kcomparator_b for the timing.
module se_kcomparator_top #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 2
) (
  input  logic         a_clk,
  input  logic         a_rst_n,
  input  logic         a_test,
  input  logic [N-1:0] a_pa,
  input  logic [N-1:0] a_pb,
  output logic         a_z0,
  output logic         a_z1,
  output logic         a_y0,
  output logic         a_y1,
  input  logic         b_clk,
  input  logic         b_rst_n,
  input  logic         b_test,
  input  logic [N-1:0] b_pa,
  input  logic [N-1:0] b_pb,
  output logic         b_z0,
  output logic         b_z1,
  output logic         b_y0,
  output logic         b_y1
);
  timeunit 1ns; timeprecision 1ps;

  se_kcomparator_a #(.N(N), .K(K)) u_a (
    .clk(a_clk), .rst_n(a_rst_n), .test(a_test), .pa(a_pa), .pb(a_pb),
    .z0(a_z0), .z1(a_z1), .y0(a_y0), .y1(a_y1)
  );

  se_kcomparator_b #(.N(N), .K(K)) u_b (
    .clk(b_clk), .rst_n(b_rst_n), .test(b_test), .pa(b_pa), .pb(b_pb),
    .z0(b_z0), .z1(b_z1), .y0(b_y0), .y1(b_y1)
  );
endmodule
