// AMA1: approximate mirror adder 1, a one-bit full adder with six fewer
// transistors than the accurate mirror adder (16 instead of 24 with output
// inverters in the published count).
//
// Function (from the published truth table, and matching the transistor
// labels of its schematic):
//   cout = B | (A & Cin)                 wrong for A,B,Cin = 0,1,0
//   sum  = (Cin & ~cout) | (A & B & Cin) wrong for 0,1,0 and 1,0,0
// As in the mirror adder, the carry stage drives a complemented node that the
// sum stage reuses; output inverters restore polarity. Purely combinational.
module ama1 (
  input  logic a,     // first operand bit
  input  logic b,     // second operand bit
  input  logic cin,   // carry in
  output logic sum,   // approximate sum bit
  output logic cout   // approximate carry out
);

  logic cout_n;  // carry stage output (complemented)
  logic sum_n;   // sum stage output (complemented)

  always_comb begin
    cout_n = ~(b | (a & cin));
    sum_n  = ~((cin & cout_n) | (a & b & cin));
    sum    = ~sum_n;
    cout   = ~cout_n;
  end

endmodule
