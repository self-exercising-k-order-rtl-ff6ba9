// kcmp_dynamic_core: behavioural (switch-level) model of the dynamic
// threshold stage shared by the power-optimised k-order comparators
// (designs A and B). This is a model of a transistor circuit, not
// synthesizable logic.
//
// Circuit modelled: pMOS t1 precharges line com; nMOS q_1..q_n, driven by
// the difference lines X_i, pull com down to line lcom, which t7 connects to
// ground. Inverter t2/t3 turns com into line feed, inverter t4/t5 turns feed
// into OUT. feed is also the gate line lp of t1, except while nMOS t6 (gate
// cp_n, the inverted clock) pulls lp to ground. The q_i are sized (module D)
// so that k or more conducting q_i overpower t1, while fewer than k leave com
// high. Hence, once t7 conducts:
//   weight(X) >= k  -> com falls, feed rises, t1 turns off, OUT = 0, and com
//                      stays low (no current) until t6 turns t1 back on;
//   1 <= weight < k -> com stays high and current flows through t1, q_i, t7;
//   weight = 0      -> no path.
// com is a dynamic node: with neither t1 nor a pull-down path it keeps its
// value. The two inverters each take 1 ns; that delay also orders the
// com -> feed -> t1 -> com loop in simulation. That loop, and the latch on
// com, are the circuit's own feedback and charge storage, and are the logic
// loop and latch that tools report for this file.
// idd_ua is the modelled supply current (LEAK_UA or ON_UA from kcmp_pkg):
// high whenever t1 and t7 and at least one q_i conduct together.
// FAULT (default F_NONE) injects one single fault of kcmp_pkg::fault_e on the
// nodes of this stage, for fault-coverage experiments.
// Ports: cp_n (gate of t6), t7_gate, x (difference lines), out, idd_ua.
// The always_latch on com is intended: it is the charge kept on the dynamic
// node.
module kcmp_dynamic_core
  import kcmp_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned K     = 2,
  parameter fault_e      FAULT = F_NONE
) (
  input  logic        cp_n,
  input  logic        t7_gate,
  input  logic [N-1:0] x,
  output logic        out,
  output int unsigned idd_ua
);
  timeunit 1ns; timeprecision 1ps;

  logic [N-1:0] xq;        // gate drive seen by each q_i
  int unsigned  w;         // number of conducting q_i
  logic         com, feed, feed_n, out_n, lp;
  logic         t1_on, t7_on, lcom_gnd, pd_strong, pd_weak;

  always_comb begin
    xq    = x;
    xq[0] = stuck(x[0], FAULT, F_X1_SA0, F_X1_SA1);
    if (FAULT == F_Q1_OPEN) xq[0] = 1'b0;
    if (FAULT == F_Q1_ON)   xq[0] = 1'b1;
    w = $countones(xq);
  end

  // t6 pulls lp low while cp_n is high; otherwise feed drives it.
  logic t6_on;
  always_comb begin
    t6_on = cp_n;
    if (FAULT == F_T6_OPEN) t6_on = 1'b0;
    if (FAULT == F_T6_ON)   t6_on = 1'b1;
  end
  assign lp = stuck(t6_on ? 1'b0 : feed, FAULT, F_LP_SA0, F_LP_SA1);

  always_comb begin
    t1_on = ~lp;
    if (FAULT == F_T1_OPEN) t1_on = 1'b0;
    if (FAULT == F_T1_ON)   t1_on = 1'b1;
    t7_on = t7_gate;
    if (FAULT == F_T7_OPEN) t7_on = 1'b0;
    if (FAULT == F_T7_ON)   t7_on = 1'b1;
    lcom_gnd = t7_on;
    if (FAULT == F_LCOM_SA0) lcom_gnd = 1'b1;  // lcom tied to ground
    if (FAULT == F_LCOM_SA1) lcom_gnd = 1'b0;  // lcom tied high: no pull-down
    pd_strong = lcom_gnd && (w >= K);
    pd_weak   = lcom_gnd && (w >= 1);
  end

  // Dynamic node com: a strong pull-down wins over t1, t1 wins over a weak
  // one, otherwise the node keeps its charge.
  always_latch begin
    if (pd_strong)    com = 1'b0;
    else if (t1_on)   com = 1'b1;
    else if (pd_weak) com = 1'b0;
  end

  assign #1 feed_n = ~com;      // t2/t3
  assign feed = stuck(feed_n, FAULT, F_FEED_SA0, F_FEED_SA1);
  assign #1 out_n = ~feed;      // t4/t5
  assign out = stuck(out_n, FAULT, F_OUT_SA0, F_OUT_SA1);

  // A Vdd-to-ground path exists when t1, t7 (or a grounded lcom) and at
  // least one q_i conduct together.
  assign idd_ua = (t1_on && pd_weak) ? ON_UA : LEAK_UA;
endmodule
