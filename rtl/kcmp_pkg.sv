// kcmp_pkg: types and constants shared by the self-exercising k-order
// comparator models.
//
// fault_e lists the single faults the comparator models can carry (chosen
// with a FAULT parameter, F_NONE in the design itself). The names follow the
// node and transistor names of the comparator schematics: clk, the inverted
// clock cp_n, the q_1 pull-down and its X_1 line, t1 (precharge pMOS), t7
// (evaluation nMOS), lcom (common source of the q_i), feed (first inverter
// output, fed back to the gate of t1), OUT, and for design B trig and res.
// The clock enters each design through two branches: CLK1 feeds the clock
// inverter, CLK2 feeds t7 (design A) or nand1 (design B).
// A fault that a design does not have (trig in design A) has no effect there.
//
// The supply-current levels are the ones quoted for the 1.0 um process:
// about 10 uA when no Vdd-to-ground path exists and about 3 mA when t1, t7
// and at least one q_i conduct at once.
package kcmp_pkg;
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [4:0] {
    F_NONE,
    F_CLK_SA0, F_CLK_SA1,     // clock input of the comparator stuck
    F_CP_SA0,  F_CP_SA1,      // inverted clock line cp_n stuck
    F_CLK1_SA0, F_CLK1_SA1,   // clock branch into the clock inverter
    F_CLK2_SA0, F_CLK2_SA1,   // clock branch into t7 (A) or nand1 (B)
    F_X1_SA0,  F_X1_SA1,      // difference line X_1 stuck
    F_Q1_OPEN, F_Q1_ON,       // pull-down transistor q_1
    F_T1_OPEN, F_T1_ON,       // precharge transistor t1
    F_T6_OPEN, F_T6_ON,       // t6, which holds t1 on during precharge
    F_T7_OPEN, F_T7_ON,       // evaluation transistor t7
    F_LCOM_SA0, F_LCOM_SA1,   // common source line lcom
    F_FEED_SA0, F_FEED_SA1,   // feed line
    F_LP_SA0,  F_LP_SA1,      // gate line lp of t1
    F_OUT_SA0, F_OUT_SA1,     // comparator output OUT
    F_TRIG_SA0, F_TRIG_SA1,   // trig line (design B only)
    F_RES_SA0, F_RES_SA1      // res line (design B only)
  } fault_e;

  localparam int unsigned LEAK_UA = 10;    // no conducting Vdd-to-ground path
  localparam int unsigned ON_UA   = 3000;  // t1, t7 and a q_i conducting together

  // Apply a stuck-at fault to a one-bit line.
  function automatic logic stuck(input logic v, input fault_e f,
                                 input fault_e f_sa0, input fault_e f_sa1);
    if (f == f_sa0) return 1'b0;
    if (f == f_sa1) return 1'b1;
    return v;
  endfunction
endpackage
