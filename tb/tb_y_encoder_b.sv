// tb_y_encoder_b: all input combinations. In the test phase (Y0,Y1) must be
// (1,0) with the sensor low and (1,1) with it high; in normal operation it
// must be the code word (0,1).
module tb_y_encoder_b;
  timeunit 1ns; timeprecision 1ps;
  logic test, bics, y0, y1;
  int checks = 0, failures = 0;

  y_encoder_b dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_y [4] = '{2'b01, 2'b01, 2'b10, 2'b11};  // index {test,bics}
    for (int v = 0; v < 4; v++) begin
      {test, bics} = 2'(v);
      #1;
      checks++;
      if ({y0, y1} !== exp_y[v]) begin
        failures++; $display("FAIL test=%b bics=%b -> %b%b", test, bics, y0, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
