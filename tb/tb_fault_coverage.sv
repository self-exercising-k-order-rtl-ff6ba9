// tb_fault_coverage: single-fault experiment on both self-exercising
// comparators (N=16, K=2). One instance per fault runs a full test phase of
// 4N vectors from reset; a fault counts as detected by logic testing when
// (z0,z1) is not a two-rail word at the end of an evaluation phase, and by
// current testing when (y0,y1) is not a two-rail word at the end of either
// phase. The fault list covers the clock and its two branches, the inverted
// clock, X_1 and q_1, t1 and its gate line lp, t6, t7, lcom, feed, OUT and (design B) trig and
// res. The self-exercising scheme claims every such fault is caught by at
// least one of the two methods within one test period, so every one must be
// detected here, and a fault-free instance of each design must raise no
// alarm. The detection table is printed.
module tb_fault_coverage;
  timeunit 1ns; timeprecision 1ps;
  import kcmp_pkg::*;
  localparam int unsigned N = 16, K = 2;
  localparam int NA = 27, NB = 31;
  localparam fault_e FA [NA] = '{
    F_NONE, F_CLK_SA0, F_CLK_SA1, F_CP_SA0, F_CP_SA1, F_CLK1_SA0, F_CLK1_SA1,
    F_CLK2_SA0, F_CLK2_SA1, F_X1_SA0, F_X1_SA1,
    F_Q1_OPEN, F_Q1_ON, F_T1_OPEN, F_T1_ON, F_T6_OPEN, F_T6_ON, F_T7_OPEN, F_T7_ON,
    F_LCOM_SA0, F_LCOM_SA1, F_FEED_SA0, F_FEED_SA1, F_LP_SA0, F_LP_SA1, F_OUT_SA0, F_OUT_SA1};
  localparam fault_e FB [NB] = '{
    F_NONE, F_CLK_SA0, F_CLK_SA1, F_CP_SA0, F_CP_SA1, F_CLK1_SA0, F_CLK1_SA1,
    F_CLK2_SA0, F_CLK2_SA1, F_X1_SA0, F_X1_SA1,
    F_Q1_OPEN, F_Q1_ON, F_T1_OPEN, F_T1_ON, F_T6_OPEN, F_T6_ON, F_T7_OPEN, F_T7_ON,
    F_LCOM_SA0, F_LCOM_SA1, F_FEED_SA0, F_FEED_SA1, F_LP_SA0, F_LP_SA1, F_OUT_SA0, F_OUT_SA1,
    F_TRIG_SA0, F_TRIG_SA1, F_RES_SA0, F_RES_SA1};

  logic clk = 1'b0, rst_n = 1'b1, test = 1'b1;
  logic [N-1:0] pa = '0, pb = '0;
  logic [NA-1:0] az0, az1, ay0, ay1;
  logic [NB-1:0] bz0, bz1, by0, by1;
  logic [NA-1:0] a_det_z = '0, a_det_y = '0;
  logic [NB-1:0] b_det_z = '0, b_det_y = '0;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NA; i++) begin : g_a
    se_kcomparator_a #(.N(N), .K(K), .FAULT(FA[i])) dut (
      .clk(clk), .rst_n(rst_n), .test(test), .pa(pa), .pb(pb),
      .z0(az0[i]), .z1(az1[i]), .y0(ay0[i]), .y1(ay1[i]));
  end
  for (genvar i = 0; i < NB; i++) begin : g_b
    se_kcomparator_b #(.N(N), .K(K), .FAULT(FB[i])) dut (
      .clk(clk), .rst_n(rst_n), .test(test), .pa(pa), .pb(pb),
      .z0(bz0[i]), .z1(bz1[i]), .y0(by0[i]), .y1(by1[i]));
  end

  always #50 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int unsigned v = 0; v < 4 * N; v++) begin
      @(posedge clk); #45;
      a_det_z |= ~(az0 ^ az1);
      a_det_y |= ~(ay0 ^ ay1);
      b_det_z |= ~(bz0 ^ bz1);
      b_det_y |= ~(by0 ^ by1);
      @(negedge clk); #45;
      a_det_y |= ~(ay0 ^ ay1);
      b_det_y |= ~(by0 ^ by1);
    end
    $display("design A   fault        logic  current");
    for (int i = 0; i < NA; i++) begin
      $display("           %-12s %0d      %0d", FA[i].name(), a_det_z[i], a_det_y[i]);
      checks++;
      if (FA[i] == F_NONE) begin
        if (a_det_z[i] || a_det_y[i]) begin failures++; $display("FAIL false alarm, design A"); end
      end else if (!(a_det_z[i] || a_det_y[i])) begin
        failures++; $display("FAIL design A %s undetected", FA[i].name());
      end
    end
    $display("design B   fault        logic  current");
    for (int i = 0; i < NB; i++) begin
      $display("           %-12s %0d      %0d", FB[i].name(), b_det_z[i], b_det_y[i]);
      checks++;
      if (FB[i] == F_NONE) begin
        if (b_det_z[i] || b_det_y[i]) begin failures++; $display("FAIL false alarm, design B"); end
      end else if (!(b_det_z[i] || b_det_y[i])) begin
        failures++; $display("FAIL design B %s undetected", FB[i].name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
