// test_input_select: the TEST-controlled switches at the comparator inputs.
//
// In normal operation (test = 0) the primary operands reach the comparator;
// in the test phase (test = 1) the test vector generator's registers A and B
// do. The schematic draws this as pass transistors gated by TEST-bar and TEST;
// here it is a 2:1 multiplexer per bit. Combinational.
// Ports: test, pa/pb (primary operands), ga/gb (generator), a/b (to comparator).
module test_input_select #(
  parameter int unsigned N = 16
) (
  input  logic         test,
  input  logic [N-1:0] pa,
  input  logic [N-1:0] pb,
  input  logic [N-1:0] ga,
  input  logic [N-1:0] gb,
  output logic [N-1:0] a,
  output logic [N-1:0] b
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    a = test ? ga : pa;
    b = test ? gb : pb;
  end
endmodule
