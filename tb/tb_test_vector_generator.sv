// tb_test_vector_generator: checks the generator against a reference built
// from step counts. A Johnson counter of n cells that has taken m steps from
// all-zero holds J(m mod 2n): m ones from cell 1 for m <= n, and m-n zeros
// followed by ones for m > n. Register A starts at J(K), B at J(0); B steps
// first and then they alternate. Checked for every vector: A and B, the
// weight of A xor B (K and K-1 in turn), that the 4N vectors of one period
// are all different, that the sequence returns to its start after 4N, and
// that it holds while en is low. Two sizes are run: the default N=16, K=2 and
// N=7, K=4.
module tb_test_vector_generator;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b1, rst_n = 1'b0, en = 1'b0;
  int checks = 0, failures = 0;

  localparam int unsigned N0 = 16, K0 = 2, N1 = 7, K1 = 4;
  logic [N0-1:0] a0, b0;
  logic [N1-1:0] a1, b1;

  test_vector_generator dut0 (.clk(clk), .rst_n(rst_n), .en(en), .a(a0), .b(b0));
  test_vector_generator #(.N(N1), .K(K1)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .a(a1), .b(b1));

  always #50 clk = ~clk;

  function automatic logic [63:0] johnson(int unsigned n, int unsigned m);
    logic [63:0] v = '0;
    int unsigned mm = m % (2 * n);
    for (int unsigned i = 0; i < n; i++)
      v[i] = (mm <= n) ? (i < mm) : (i >= mm - n);
    return v;
  endfunction

  task automatic check_one(int unsigned n, int unsigned k, int unsigned step,
                           logic [63:0] a, logic [63:0] b);
    int unsigned ma, mb, wexp;
    mb = (step + 1) / 2;
    ma = step / 2;
    wexp = (step % 2 == 0) ? k : k - 1;
    checks += 3;
    if (a !== johnson(n, k + ma)) begin
      failures++; $display("FAIL n=%0d step=%0d A=%h exp %h", n, step, a, johnson(n, k + ma));
    end
    if (b !== johnson(n, mb)) begin
      failures++; $display("FAIL n=%0d step=%0d B=%h exp %h", n, step, b, johnson(n, mb));
    end
    if ($countones(a ^ b) != wexp) begin
      failures++; $display("FAIL n=%0d step=%0d weight %0d", n, step, $countones(a ^ b));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2*N0-1:0] seen0 [$];
  initial begin
    int unsigned step;
    #120 rst_n = 1'b1;
    en = 1'b1;
    step = 0;
    #1;
    for (int t = 0; t < 4 * N0 + 6; t++) begin
      check_one(N0, K0, step, 64'(a0), 64'(b0));
      if (step < 4 * N1 + 3) check_one(N1, K1, step, 64'(a1), 64'(b1));
      if (step < 4 * N0) begin
        checks++;
        foreach (seen0[i]) if (seen0[i] == {a0, b0}) begin
          failures++; $display("FAIL repeat at step %0d", step);
        end
        seen0.push_back({a0, b0});
      end else if (step == 4 * N0) begin
        checks++;
        if ({a0, b0} != seen0[0]) failures++;
      end
      if (t == 20) begin
        // hold for three cycles with en low
        en = 1'b0;
        repeat (3) begin
          @(posedge clk); #1;
          check_one(N0, K0, step, 64'(a0), 64'(b0));
        end
        en = 1'b1;
      end
      step++;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
