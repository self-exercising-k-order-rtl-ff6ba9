// tb_operand_xor: random operands; each difference line is checked bit by
// bit against its own XOR truth table, and the count of high lines against
// a separately computed Hamming distance.
module tb_operand_xor;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, x;
  int checks = 0, failures = 0;

  operand_xor #(.N(N)) dut (.a(a), .b(b), .x(x));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int hd;
      a = N'($urandom); b = N'($urandom);
      if (t == 0) begin a = '0; b = '1; end
      #1;
      hd = 0;
      for (int i = 0; i < N; i++) begin
        logic e;
        e = (a[i] == b[i]) ? 1'b0 : 1'b1;
        hd += int'(e);
        checks++;
        if (x[i] !== e) begin
          failures++;
          $display("FAIL a=%h b=%h bit %0d x=%b", a, b, i, x[i]);
        end
      end
      checks++;
      if ($countones(x) != hd) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
