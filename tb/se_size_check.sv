// se_size_check: test helper that runs both self-exercising comparators at
// one (N, K) through a full test period from reset and a normal phase with
// every operand distance 0..N, checking the two-rail pairs and z1 as in the
// top-level testbench. It reports its counts on its outputs and raises done.
module se_size_check #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3
) (
  output logic done,
  output int   checks,
  output int   failures
);
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b1, test = 1'b1;
  logic [N-1:0] pa = '0, pb = '0;
  logic a_z0, a_z1, a_y0, a_y1, b_z0, b_z1, b_y0, b_y1;

  se_kcomparator_a #(.N(N), .K(K)) u_a (.clk(clk), .rst_n(rst_n), .test(test), .pa(pa), .pb(pb),
    .z0(a_z0), .z1(a_z1), .y0(a_y0), .y1(a_y1));
  se_kcomparator_b #(.N(N), .K(K)) u_b (.clk(clk), .rst_n(rst_n), .test(test), .pa(pa), .pb(pb),
    .z0(b_z0), .z1(b_z1), .y0(b_y0), .y1(b_y1));

  always #50 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL N=%0d K=%0d %s at %0t", N, K, what, $time); end
  endtask

  function automatic logic [N-1:0] flip_mask(int unsigned w);
    logic [N-1:0] m = '0;
    int unsigned cnt = 0;
    while (cnt < w) begin
      int unsigned p = $urandom_range(N - 1);
      if (!m[p]) begin m[p] = 1'b1; cnt++; end
    end
    return m;
  endfunction

  initial begin
    logic exp_z1;
    done = 1'b0; checks = 0; failures = 0;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    exp_z1 = 1'b0;
    for (int unsigned v = 0; v < 4 * N; v++) begin
      @(posedge clk); #45;
      chk(a_z0 != a_z1 && a_z1 == exp_z1, $sformatf("A test vector %0d", v));
      chk(b_z0 != b_z1 && b_z1 == exp_z1, $sformatf("B test vector %0d", v));
      chk(a_y0 != a_y1 && b_y0 != b_y1, $sformatf("eval y pairs, vector %0d", v));
      exp_z1 = ~exp_z1;
      @(negedge clk); #45;
      chk(a_y0 != a_y1 && b_y0 != b_y1, $sformatf("precharge y pairs, vector %0d", v));
    end
    test = 1'b0;
    for (int unsigned w = 0; w <= N; w++) begin
      pa = N'($urandom);
      pb = pa ^ flip_mask(w);
      @(posedge clk); #45;
      chk(a_z1 == (w < K) && b_z1 == (w < K), $sformatf("normal distance %0d", w));
      chk(a_z0 == 1'b0 && b_z0 == 1'b0 && a_y0 != a_y1 && b_y0 != b_y1, "normal pairs");
      @(negedge clk);
    end
    done = 1'b1;
  end
endmodule
