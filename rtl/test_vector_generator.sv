// test_vector_generator: the built-in source of test vectors for an n-bit
// k-order comparator.
//
// Two n-bit shift registers A and B; in each the last cell feeds the first
// through an inverter (a twisted-ring or Johnson counter, period 2n). A
// starts with k ones followed by n-k zeros, cell A_1 (bit 0, the least
// significant, drawn at the left) first; B starts all zero. The registers
// shift on alternate steps, B first, so A stays k or k-1 Johnson steps ahead
// of B and A xor B has Hamming weight k and k-1 in turn. The whole sequence
// repeats after 4n vectors, each register shifting 2n times.
// Timing: one step per falling edge of clk (the start of the comparator's
// precharge phase) while en (TEST) is high, so a new vector is stable through
// a whole precharge/evaluation cycle. rst_n is asynchronous, active low.
// The alternation of the two registers and the edge used are choices of this
// implementation; the register structure and initial states are the
// document's.
module test_vector_generator #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] a,
  output logic [N-1:0] b
);
  timeunit 1ns; timeprecision 1ps;

  localparam logic [N-1:0] A_INIT = N'((64'd1 << K) - 64'd1);

  logic shift_b;  // which register takes the next step

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a       <= A_INIT;
      b       <= '0;
      shift_b <= 1'b1;
    end else if (en) begin
      if (shift_b) b <= {b[N-2:0], ~b[N-1]};
      else         a <= {a[N-2:0], ~a[N-1]};
      shift_b <= ~shift_b;
    end
  end

  initial begin
    assert (K >= 1 && K <= N) else $error("test_vector_generator: need 1 <= K <= N");
  end
endmodule
