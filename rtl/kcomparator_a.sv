// kcomparator_a: behavioural model of the power-optimised dynamic k-order
// comparator "design A" (a transistor circuit; this is a simulation model,
// not synthesizable logic).
//
// It decides whether two N-bit operands differ in fewer than K bit positions.
// Two phases per clock cycle:
//   precharge (clk low):  t7 is off, inverter t8/t9 drives cp_n high so t6
//                         holds t1 on; line com charges and OUT is high.
//   evaluation (clk high): t7 conducts. If K or more difference lines are
//                         high, com discharges, feed goes high and turns t1
//                         off, and OUT falls. With fewer than K, OUT stays
//                         high.
// So at the end of evaluation OUT = 1 iff weight(a xor b) < K. Static current
// (idd_ua = ON_UA) flows only in evaluation with 1 <= weight < K; every other
// case draws leakage only. The operands should change only during precharge.
// The node behaviour (see kcmp_dynamic_core) follows the document's circuit
// description; delays (1 ns per gate) are this model's own.
// Ports: clk, a, b, out (OUT), idd_ua (modelled supply current, sensed by
// the built-in current sensor). FAULT injects one fault for test studies.
module kcomparator_a
  import kcmp_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned K     = 2,
  parameter fault_e      FAULT = F_NONE
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out,
  output int unsigned  idd_ua
);
  timeunit 1ns; timeprecision 1ps;

  logic [N-1:0] x;
  logic clk_i, clk_1, clk_2, cp_n_i, cp_n;

  operand_xor #(.N(N)) u_xor (.a(a), .b(b), .x(x));

  assign clk_i = stuck(clk, FAULT, F_CLK_SA0, F_CLK_SA1);
  assign clk_1 = stuck(clk_i, FAULT, F_CLK1_SA0, F_CLK1_SA1);  // branch cp1
  assign clk_2 = stuck(clk_i, FAULT, F_CLK2_SA0, F_CLK2_SA1);  // branch cp2
  assign #1 cp_n_i = ~clk_1;    // t8/t9 inverter
  assign cp_n = stuck(cp_n_i, FAULT, F_CP_SA0, F_CP_SA1);

  // t7 is driven straight from the clock (line cp2).
  kcmp_dynamic_core #(.N(N), .K(K), .FAULT(FAULT)) u_core (
    .cp_n(cp_n), .t7_gate(clk_2), .x(x), .out(out), .idd_ua(idd_ua)
  );
endmodule
