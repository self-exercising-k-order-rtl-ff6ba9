// kcomparator_b: behavioural model of the power-optimised dynamic k-order
// comparator "design B" (a transistor circuit; this is a simulation model,
// not synthesizable logic).
//
// Same threshold stage as design A, but t7 is not driven by the clock.
// The clock goes through an inverter to cp_n (the gate of t6) and, with cp_n,
// into gate nand1, whose output trig therefore pulses low for T_EVENT_NS
// after each rising clock edge (the inverter's delay). Gate nand2 forms
// res = not(OUT and trig), which drives t7:
//   - during the trig pulse t7 and t1 both conduct and the stage evaluates:
//     K or more high difference lines pull com low and OUT falls;
//   - after the pulse t7 stays on only if OUT is low, when t1 is already off.
// So the Vdd-to-ground current of design A (1 <= weight < K) lasts only for
// the pulse, and the evaluation result is the same: at the end of the
// evaluation phase OUT = 1 iff weight(a xor b) < K. The pulse must be long
// enough for the stage to settle (3 gate delays here) and much shorter than
// half a clock period.
// As drawn, a low OUT keeps t7 on into the next precharge; if the next
// operands again differ in K or more bits, com stays low and current flows
// through t1 during that precharge. The model shows this; in the test phase,
// where weights K and K-1 alternate, it never happens.
// T_EVENT_NS is this model's choice (the document gives no value).
// The loop OUT -> nand2 -> res -> t7 -> com -> OUT that synthesis and lint
// tools report is the circuit's own feedback; the 1 ns inverter delays of
// the threshold stage order it in simulation.
// Ports: clk, a, b, out (OUT), trig (for observation), idd_ua (supply
// current). FAULT injects one fault for test studies.
module kcomparator_b
  import kcmp_pkg::*;
#(
  parameter int unsigned N          = 16,
  parameter int unsigned K          = 2,
  parameter int unsigned T_EVENT_NS = 5,
  parameter fault_e      FAULT      = F_NONE
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out,
  output logic         trig,
  output int unsigned  idd_ua
);
  timeunit 1ns; timeprecision 1ps;

  logic [N-1:0] x;
  logic clk_i, clk_1, clk_2, cp_n_i, cp_n, trig_i, res_i, res;

  operand_xor #(.N(N)) u_xor (.a(a), .b(b), .x(x));

  assign clk_i = stuck(clk, FAULT, F_CLK_SA0, F_CLK_SA1);
  assign clk_1  = stuck(clk_i, FAULT, F_CLK1_SA0, F_CLK1_SA1);  // branch clk_1
  assign clk_2  = stuck(clk_i, FAULT, F_CLK2_SA0, F_CLK2_SA1);  // branch clk_2
  assign #(T_EVENT_NS) cp_n_i = ~clk_1;       // clock inverter
  assign cp_n   = stuck(cp_n_i, FAULT, F_CP_SA0, F_CP_SA1);
  assign trig_i = ~(clk_2 & cp_n);            // nand1
  assign trig   = stuck(trig_i, FAULT, F_TRIG_SA0, F_TRIG_SA1);
  assign res_i  = ~(out & trig);              // nand2
  assign res    = stuck(res_i, FAULT, F_RES_SA0, F_RES_SA1);

  kcmp_dynamic_core #(.N(N), .K(K), .FAULT(FAULT)) u_core (
    .cp_n(cp_n), .t7_gate(res), .x(x), .out(out), .idd_ua(idd_ua)
  );
endmodule
