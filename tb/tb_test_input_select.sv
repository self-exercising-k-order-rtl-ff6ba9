// tb_test_input_select: random primary and generator operands in both
// modes; the comparator-side operands must come from the generator exactly
// when TEST is high.
module tb_test_input_select;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned N = 16;
  logic test;
  logic [N-1:0] pa, pb, ga, gb, a, b;
  int checks = 0, failures = 0;

  test_input_select #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      test = t[0];
      pa = N'($urandom); pb = N'($urandom); ga = N'($urandom); gb = N'($urandom);
      #1;
      checks += 2;
      if (test) begin
        if (a !== ga) failures++;
        if (b !== gb) failures++;
      end else begin
        if (a !== pa) failures++;
        if (b !== pb) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
