// se_kcomparator_b: self-exercising, self-testing k-order comparator built on
// the power-optimised dynamic comparator of design B.
//
// Normal operation (test = 0): the primary operands pa, pb are compared and
// z1 = 1 at the end of each evaluation phase (clk high) iff they differ in
// fewer than K bits; z0 is held at 0.
// Test phase (test = 1): the built-in generator feeds the comparator 4N
// vectors of Hamming weight K and K-1 in turn, one per clock cycle, and the
// toggle flip-flop CNSI produces S (0 while a weight-K vector is applied).
// z0 = not S is then the complement of the fault-free comparator output, so
// (z0, z1) is a two-rail code word at the end of every evaluation phase
// unless a fault has shown up in the logic value.
// (Y0, Y1): a second two-rail pair from the current sensor, which must stay
// low throughout the test phase.
// A non-code word on either pair flags a fault.
// Timing: generator and CNSI step on the falling clock edge, so each vector
// is applied at the start of precharge and held through evaluation. Read
// (z0, z1) at the end of the evaluation phase and (y0, y1) at the end of each
// phase. rst_n (asynchronous, active low) restarts the test sequence.
// Structure and block connections follow the document's checker figures; the
// Z0 gate function (z0 = TEST and not S) and the sampling points are this
// implementation's reading of them.
// FAULT is passed to the comparator model for fault-injection studies.
module se_kcomparator_b
  import kcmp_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned K     = 2,
  parameter int unsigned T_EVENT_NS = 5,
  parameter fault_e      FAULT = F_NONE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test,
  input  logic [N-1:0] pa,
  input  logic [N-1:0] pb,
  output logic         z0,
  output logic         z1,
  output logic         y0,
  output logic         y1
);
  timeunit 1ns; timeprecision 1ps;

  logic [N-1:0] ga, gb, ca, cb;
  logic         s, bics_out;
  int unsigned  idd_ua;

  test_vector_generator #(.N(N), .K(K)) u_gen (
    .clk(clk), .rst_n(rst_n), .en(test), .a(ga), .b(gb)
  );

  cnsi u_cnsi (.clk(clk), .rst_n(rst_n), .en(test), .s(s));

  test_input_select #(.N(N)) u_sel (
    .test(test), .pa(pa), .pb(pb), .ga(ga), .gb(gb), .a(ca), .b(cb)
  );

  kcomparator_b #(.N(N), .K(K), .T_EVENT_NS(T_EVENT_NS), .FAULT(FAULT)) u_cmp (
    .clk(clk), .a(ca), .b(cb), .out(z1), .trig(), .idd_ua(idd_ua)
  );

  assign z0 = test & ~s;

  bics u_bics (.idd_ua(idd_ua), .out(bics_out));

  y_encoder_b u_yenc (.test(test), .bics(bics_out), .y0(y0), .y1(y1));
endmodule
