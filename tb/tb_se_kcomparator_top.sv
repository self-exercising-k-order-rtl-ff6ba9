// tb_se_kcomparator_top: end-to-end test of both self-exercising comparators
// at the default size (N=16, K=2), with no parameter overrides.
// Each design runs: a full test phase of 4N vectors from reset, a normal
// phase with random operands of every distance, and a second test phase.
// Checked: the two-rail pairs (z, y) at the end of each phase, z1 against
// the expected comparator result in both modes, z0 = 0 in normal mode.
// Counted, and required to happen at least once: weight-K and weight-(K-1)
// test vectors, the full 4N-vector period, the current sensor firing in
// design A's evaluation, the trig pulse of design B, matches (distance 0),
// near matches (1 <= distance < K) and mismatches in normal mode, switches
// between the two modes, and the precharge current design B draws after two
// successive mismatches.
module tb_se_kcomparator_top;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned N = 16, K = 2;
  logic clk = 1'b0, rst_n = 1'b1, test = 1'b1;
  logic [N-1:0] pa = '0, pb = '0;
  logic a_z0, a_z1, a_y0, a_y1, b_z0, b_z1, b_y0, b_y1;
  int checks = 0, failures = 0;
  int n_wk = 0, n_wk1 = 0, n_period = 0, n_bics_a = 0, n_trig_b = 0;
  int n_match = 0, n_near = 0, n_mismatch = 0, n_switch = 0, n_pre_b = 0;

  // Both designs share one clock and one stimulus here.
  se_kcomparator_top dut (
    .a_clk(clk), .a_rst_n(rst_n), .a_test(test), .a_pa(pa), .a_pb(pb),
    .a_z0(a_z0), .a_z1(a_z1), .a_y0(a_y0), .a_y1(a_y1),
    .b_clk(clk), .b_rst_n(rst_n), .b_test(test), .b_pa(pa), .b_pb(pb),
    .b_z0(b_z0), .b_z1(b_z1), .b_y0(b_y0), .b_y1(b_y1)
  );

  always #50 clk = ~clk;

  always @(negedge dut.u_b.u_cmp.trig) n_trig_b++;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
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

  task automatic test_phase();
    logic exp_z1;
    if (!test) n_switch++;
    test = 1'b1;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    exp_z1 = 1'b0;
    for (int unsigned v = 0; v < 4 * N; v++) begin
      @(posedge clk); #45;
      chk(a_z0 != a_z1 && a_z1 == exp_z1, $sformatf("A test vector %0d (z0,z1)=%b%b", v, a_z0, a_z1));
      chk(b_z0 != b_z1 && b_z1 == exp_z1, $sformatf("B test vector %0d (z0,z1)=%b%b", v, b_z0, b_z1));
      chk(a_y0 != a_y1 && b_y0 != b_y1, $sformatf("test vector %0d eval y pairs", v));
      if (exp_z1) n_wk1++; else n_wk++;
      if (dut.u_a.bics_out) n_bics_a++;
      exp_z1 = ~exp_z1;
      @(negedge clk); #45;
      chk(a_y0 != a_y1 && b_y0 != b_y1, $sformatf("test vector %0d precharge y pairs", v));
    end
    n_period++;
  endtask

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned w;
    test_phase();
    @(negedge clk);
    test = 1'b0;
    n_switch++;
    for (int r = 0; r < 3 * (N + 1); r++) begin
      w = (r < 2 * (N + 1)) ? r % (N + 1) : $urandom_range(N);
      if (r % 5 == 2) w = N;   // runs of two mismatches
      pa = N'($urandom);
      pb = pa ^ flip_mask(w);
      #45;
      if (dut.u_b.bics_out) n_pre_b++;
      chk(a_y0 != a_y1 && b_y0 != b_y1, "normal precharge y pairs");
      @(posedge clk); #45;
      chk(a_z1 == (w < K) && b_z1 == (w < K), $sformatf("normal distance %0d: z1 A=%b B=%b", w, a_z1, b_z1));
      chk(a_z0 == 1'b0 && b_z0 == 1'b0, "normal z0");
      chk(a_y0 != a_y1 && b_y0 != b_y1, "normal eval y pairs");
      if (w == 0) n_match++; else if (w < K) n_near++; else n_mismatch++;
      @(negedge clk);
    end
    test_phase();
    $display("weight-K vectors %0d, weight-(K-1) vectors %0d, full periods %0d", n_wk, n_wk1, n_period);
    $display("design A sensor high in evaluation %0d, design B trig pulses %0d", n_bics_a, n_trig_b);
    $display("normal: matches %0d, near matches %0d, mismatches %0d, mode switches %0d, B precharge current %0d",
             n_match, n_near, n_mismatch, n_switch, n_pre_b);
    chk(n_wk > 0, "weight-K vectors seen");
    chk(n_wk1 > 0, "weight-(K-1) vectors seen");
    chk(n_period >= 2, "full test periods");
    chk(n_bics_a == n_wk1, "design A sensor fires on every weight-(K-1) evaluation");
    chk(n_trig_b > 0, "trig pulses");
    chk(n_match > 0 && n_near > 0 && n_mismatch > 0, "all normal-mode result classes");
    chk(n_switch >= 2, "mode switches");
    chk(n_pre_b > 0, "design B precharge current after repeated mismatches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
