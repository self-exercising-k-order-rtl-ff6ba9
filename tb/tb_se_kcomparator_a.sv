// tb_se_kcomparator_a: end-to-end run of the self-exercising comparator on
// design A at its default size (N=16, K=2).
//   Test phase, two full periods of 4N vectors: at the end of every
//   evaluation (z0,z1) must be a two-rail code word, z1 must alternate
//   0,1,0,... from reset (weight K first), and (y0,y1) must be a code word at
//   the end of both phases.
//   Normal phase: random operands of every distance 0..N; z1 must be 1 iff
//   the distance is below K, z0 must be 0 and (y0,y1) a code word.
//   A second test phase after normal operation restarts from reset.
module tb_se_kcomparator_a;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned N = 16, K = 2;
  logic clk = 1'b0, rst_n = 1'b1, test = 1'b1;
  logic [N-1:0] pa = '0, pb = '0;
  logic z0, z1, y0, y1;
  int checks = 0, failures = 0;

  se_kcomparator_a dut (.*);

  always #50 clk = ~clk;

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

  task automatic test_phase(int unsigned vectors);
    logic exp_z1;
    test = 1'b1;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    exp_z1 = 1'b0;
    for (int unsigned v = 0; v < vectors; v++) begin
      @(posedge clk); #45;                  // end of evaluation
      chk(z0 != z1, $sformatf("test vector %0d: (z0,z1)=%b%b not two-rail", v, z0, z1));
      chk(z1 == exp_z1, $sformatf("test vector %0d: z1=%b", v, z1));
      chk(y0 != y1, $sformatf("test vector %0d: eval (y0,y1)=%b%b", v, y0, y1));
      exp_z1 = ~exp_z1;
      @(negedge clk); #45;                  // end of the next precharge
      chk(y0 != y1, $sformatf("test vector %0d: precharge (y0,y1)=%b%b", v, y0, y1));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    test_phase(8 * N);
    // normal operation
    @(negedge clk);
    test = 1'b0;
    for (int r = 0; r < 4; r++) begin
      for (int unsigned w = 0; w <= N; w++) begin
        pa = N'($urandom);
        pb = pa ^ flip_mask(w);
        @(posedge clk); #45;
        chk(z1 == (w < K), $sformatf("normal: distance %0d gives z1=%b", w, z1));
        chk(z0 == 1'b0, "normal: z0 must be 0");
        chk(y0 != y1, "normal: (y0,y1) code word");
        @(negedge clk);
      end
    end
    test_phase(4 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
