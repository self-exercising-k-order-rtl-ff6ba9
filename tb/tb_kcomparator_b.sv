// tb_kcomparator_b: drives the design-B comparator model with operand pairs
// of every Hamming distance 0..N, changing them at the start of precharge,
// and checks per clock cycle:
//   trig low right after the rising clock edge and high again after
//   T_EVENT_NS (the pulse of line trig);
//   during the pulse the large current flows iff at least one q_i conducts;
//   end of evaluation: OUT = 1 iff distance < K and leakage current only;
//   end of precharge: OUT = 1, and current only in the case the circuit as
//   drawn allows it (previous OUT low and the new distance again >= K).
// The 16-bit order-2 instance prints the modelled static power for 0, 1 and
// 2 conducting q_i. A second instance uses N=9, K=4.
module tb_kcomparator_b;
  timeunit 1ns; timeprecision 1ps;
  import kcmp_pkg::*;
  localparam int unsigned N0 = 16, K0 = 2, N1 = 9, K1 = 4, TE = 5;
  logic clk = 1'b0;
  logic [N0-1:0] a0, b0;
  logic [N1-1:0] a1, b1;
  logic out0, out1, trig0, trig1;
  int unsigned idd0, idd1;
  int checks = 0, failures = 0;

  kcomparator_b dut0 (.clk(clk), .a(a0), .b(b0), .out(out0), .trig(trig0), .idd_ua(idd0));
  kcomparator_b #(.N(N1), .K(K1)) dut1 (.clk(clk), .a(a1), .b(b1), .out(out1), .trig(trig1), .idd_ua(idd1));

  function automatic logic [31:0] flip_mask(int unsigned n, int unsigned w);
    logic [31:0] m = '0;
    int unsigned cnt = 0;
    while (cnt < w) begin
      int unsigned p = $urandom_range(n - 1);
      if (!m[p]) begin m[p] = 1'b1; cnt++; end
    end
    return m;
  endfunction

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev0, prev1;
    logic [2:0] printed = '0;
    int unsigned order [$];
    a0 = '0; b0 = '0; a1 = '0; b1 = '0;
    prev0 = 1'b1; prev1 = 1'b1;
    #50;
    // distances in a shuffled order so that runs of large distances occur
    for (int rep = 0; rep < 6; rep++)
      for (int unsigned w = 0; w <= N0; w++) order.push_back(w);
    for (int i = order.size() - 1; i > 0; i--) begin
      int j;
      int unsigned tmp;
      j = $urandom_range(i);
      tmp = order[i];
      order[i] = order[j];
      order[j] = tmp;
    end
    foreach (order[i]) begin
      int unsigned w, w1;
      w = order[i];
      w1 = w % (N1 + 1);
      a0 = N0'($urandom); b0 = a0 ^ N0'(flip_mask(N0, w));
      a1 = N1'($urandom); b1 = a1 ^ N1'(flip_mask(N1, w1));
      clk = 1'b0;
      #40;
      chk(out0 === (prev0 || w < K0) && out1 === (prev1 || w1 < K1), "precharge OUT");
      chk((idd0 == ON_UA) === (!prev0 && w >= K0), $sformatf("N16 precharge current, distance %0d", w));
      chk((idd1 == ON_UA) === (!prev1 && w1 >= K1), $sformatf("N9 precharge current, distance %0d", w1));
      #10 clk = 1'b1;
      #2;
      chk(trig0 === 1'b0 && trig1 === 1'b0, "trig pulse low");
      chk((idd0 == ON_UA) === (w >= 1), $sformatf("N16 pulse current, distance %0d", w));
      chk((idd1 == ON_UA) === (w1 >= 1), $sformatf("N9 pulse current, distance %0d", w1));
      #(TE + 2);
      chk(trig0 === 1'b1 && trig1 === 1'b1, "trig back high");
      #(40 - TE - 4);
      chk(out0 === (w < K0), $sformatf("N16 OUT for distance %0d", w));
      chk(out1 === (w1 < K1), $sformatf("N9 OUT for distance %0d", w1));
      chk(idd0 == LEAK_UA && idd1 == LEAK_UA, "no static current in evaluation");
      if (w <= 2 && !printed[w]) begin
        printed[w] = 1'b1;
        $display("design B, 16-bit order-2, %0d conducting q: static power %0d uW", w, idd0 * 5);
      end
      prev0 = out0; prev1 = out1;
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
