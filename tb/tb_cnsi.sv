// tb_cnsi: after reset S must be 0 and must toggle on every falling clock
// edge while enabled, and hold while disabled.
module tb_cnsi;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b1, rst_n = 1'b1, en = 1'b0, s;
  logic exp_s;
  int checks = 0, failures = 0;

  cnsi dut (.*);

  always #50 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 rst_n = 1'b0;
    #10;
    checks++; if (s !== 1'b0) failures++;
    rst_n = 1'b1;
    exp_s = 1'b0;
    for (int t = 0; t < 60; t++) begin
      en = (t % 7) != 3;
      @(negedge clk);
      if (en) exp_s = ~exp_s;
      #1;
      checks++;
      if (s !== exp_s) begin
        failures++;
        $display("FAIL t=%0d en=%b s=%b exp=%b", t, en, s, exp_s);
      end
      @(posedge clk); #1;
      checks++;
      if (s !== exp_s) failures++;   // no change on the rising edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
