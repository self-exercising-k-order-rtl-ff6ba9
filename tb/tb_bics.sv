// tb_bics: the sensor output must follow "current above 1 mA" after the
// 2 ns detection delay and not before.
module tb_bics;
  timeunit 1ns; timeprecision 1ps;
  int unsigned idd_ua;
  logic out;
  int checks = 0, failures = 0;

  bics dut (.idd_ua(idd_ua), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned vals [8] = '{10, 3000, 999, 1000, 1001, 5, 2500, 0};
    logic prev, e;
    idd_ua = 0;
    #10;
    prev = 1'b0;
    foreach (vals[i]) begin
      idd_ua = vals[i];
      e = vals[i] > 1000;
      #1;
      checks++;
      if (out !== prev) begin failures++; $display("FAIL early change at %0d uA", vals[i]); end
      #2;
      checks++;
      if (out !== e) begin failures++; $display("FAIL %0d uA -> %b", vals[i], out); end
      prev = e;
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
