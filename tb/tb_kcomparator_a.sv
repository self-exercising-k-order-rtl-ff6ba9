// tb_kcomparator_a: drives the design-A comparator model with operand pairs
// of every Hamming distance 0..N (random bit positions), changing them at the
// start of precharge, and checks per clock cycle:
//   end of precharge:  OUT = 1 and leakage current only;
//   end of evaluation: OUT = 1 iff distance < K, and the large current
//                      (ON_UA) iff 1 <= distance < K.
// The 16-bit, order-2 instance is the configuration of the document's
// static-power table: the distance is the number of conducting q_i, and the
// modelled static power (5 V times current) is printed for 0, 1 and 2. A
// second instance (N=9, K=4) covers a higher order.
module tb_kcomparator_a;
  timeunit 1ns; timeprecision 1ps;
  import kcmp_pkg::*;
  localparam int unsigned N0 = 16, K0 = 2, N1 = 9, K1 = 4;
  logic clk = 1'b0;
  logic [N0-1:0] a0, b0;
  logic [N1-1:0] a1, b1;
  logic out0, out1;
  int unsigned idd0, idd1;
  int checks = 0, failures = 0;

  kcomparator_a dut0 (.clk(clk), .a(a0), .b(b0), .out(out0), .idd_ua(idd0));
  kcomparator_a #(.N(N1), .K(K1)) dut1 (.clk(clk), .a(a1), .b(b1), .out(out1), .idd_ua(idd1));

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
    a0 = '0; b0 = '0; a1 = '0; b1 = '0;
    #50;
    for (int rep = 0; rep < 6; rep++) begin
      for (int unsigned w = 0; w <= N0; w++) begin
        int unsigned w1;
        w1 = w % (N1 + 1);
        // start of precharge: new operands
        a0 = N0'($urandom); b0 = a0 ^ N0'(flip_mask(N0, w));
        a1 = N1'($urandom); b1 = a1 ^ N1'(flip_mask(N1, w1));
        clk = 1'b0;
        #40;
        chk(out0 === 1'b1 && out1 === 1'b1, "precharge OUT high");
        chk(idd0 == LEAK_UA && idd1 == LEAK_UA, "precharge leakage only");
        #10 clk = 1'b1;
        #40;
        chk(out0 === (w < K0), $sformatf("N16 OUT for distance %0d", w));
        chk(out1 === (w1 < K1), $sformatf("N9 OUT for distance %0d", w1));
        chk((idd0 == ON_UA) === (w >= 1 && w < K0), $sformatf("N16 current for distance %0d", w));
        chk((idd1 == ON_UA) === (w1 >= 1 && w1 < K1), $sformatf("N9 current for distance %0d", w1));
        if (rep == 0 && w <= 2)
          $display("design A, 16-bit order-2, %0d conducting q: static power %0d uW", w, idd0 * 5);
        #10;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
