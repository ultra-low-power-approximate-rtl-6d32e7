// Approximate adder family: the three proposed 16-bit approximate adders,
// AA1, AA2 and AA3, side by side on the same operands.
//
// The three adders are alternatives that trade accuracy for area, power and
// delay in different amounts: AA1 (AMA1 cells on the low 12 bits) is the most
// accurate, AA3 (AMA3 cells, no carry chain in the low 12 bits) the cheapest
// and fastest, AA2 (AMA2 cells) in between in cost. An application picks one;
// this top makes all three available on one operand pair so that they can be
// compared or used in parallel. Each adder has its own sum and carry out.
// Purely combinational: no clock and no state.
module approx_adder_top
  import approx_adder_pkg::*;
#(
  parameter int unsigned WIDTH       = ADDER_WIDTH,                    // total bits
  parameter int unsigned APPROX_BITS = ADDER_APPROX_BITS   // low bits on approximate cells
) (
  input  logic [WIDTH-1:0] a,          // first operand
  input  logic [WIDTH-1:0] b,          // second operand
  output logic [WIDTH-1:0] sum_aa1,    // AA1 sum
  output logic             cout_aa1,   // AA1 carry out
  output logic [WIDTH-1:0] sum_aa2,    // AA2 sum
  output logic             cout_aa2,   // AA2 carry out
  output logic [WIDTH-1:0] sum_aa3,    // AA3 sum
  output logic             cout_aa3    // AA3 carry out
);

  aa1 #(.WIDTH(WIDTH), .APPROX_BITS(APPROX_BITS)) u_aa1 (
    .a(a), .b(b), .sum(sum_aa1), .cout(cout_aa1));

  aa2 #(.WIDTH(WIDTH), .APPROX_BITS(APPROX_BITS)) u_aa2 (
    .a(a), .b(b), .sum(sum_aa2), .cout(cout_aa2));

  aa3 #(.WIDTH(WIDTH), .APPROX_BITS(APPROX_BITS)) u_aa3 (
    .a(a), .b(b), .sum(sum_aa3), .cout(cout_aa3));

endmodule
