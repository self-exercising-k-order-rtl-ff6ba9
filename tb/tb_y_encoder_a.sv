// tb_y_encoder_a: all 16 input combinations. Reference: the sensor's
// fault-free value is high only in evaluation (clk=1) of a weight-(k-1)
// vector (test=1, S=1) and is never judged in normal-mode evaluation. (Y0,Y1)
// must be a two-rail code word exactly when the sensor agrees, and must
// equal (1,1) / (0,0) for the two evaluation-phase disagreements and (0,0)
// for current in precharge.
module tb_y_encoder_a;
  timeunit 1ns; timeprecision 1ps;
  logic test, clk, bics, s, y0, y1;
  int checks = 0, failures = 0;

  y_encoder_a dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic judged, expect_b, ok;
      {test, clk, bics, s} = 4'(v);
      #1;
      judged   = !(clk && !test);
      expect_b = test && clk && s;
      ok = !judged || (bics == expect_b);
      checks++;
      if ((y0 != y1) !== ok) begin
        failures++; $display("FAIL test=%b clk=%b bics=%b s=%b -> %b%b", test, clk, bics, s, y0, y1);
      end
      if (judged && !ok) begin
        checks++;
        if (clk && !s && {y0, y1} !== 2'b11) failures++;
        if (clk &&  s && {y0, y1} !== 2'b00) failures++;
        if (!clk      && {y0, y1} !== 2'b00) failures++;
      end
      if (test && clk && ok) begin
        checks++;
        if (y0 !== ~s) failures++;  // Y0 carries the expected comparator result
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
