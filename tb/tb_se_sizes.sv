// tb_se_sizes: runs both self-exercising comparators at several sizes other
// than the default: (N,K) = (8,3), (5,5) (order equal to the width), (12,2)
// and (9,6). Each size gets a full 4N-vector test period and a normal phase
// over all distances (see se_size_check).
module tb_se_sizes;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] done;
  int c [4], f [4];

  se_size_check #(.N(8),  .K(3)) s0 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  se_size_check #(.N(5),  .K(5)) s1 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  se_size_check #(.N(12), .K(2)) s2 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  se_size_check #(.N(9),  .K(6)) s3 (.done(done[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    #10;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
