// AMA2: approximate mirror adder 2. The accurate sum equals the inverted carry
// in six of the eight input combinations, so this cell has no sum stage at
// all: the complemented carry node is buffered (two inverters, to keep the
// load off the carry node) and taken as the sum.
//
// Function (from the published truth table; the carry stage is the same as
// in AMA1, as its schematic shows):
//   cout = B | (A & Cin)     wrong for A,B,Cin = 0,1,0
//   sum  = ~cout             wrong for 0,0,0 / 0,1,0 / 1,1,1
// Purely combinational.
module ama2 (
  input  logic a,     // first operand bit
  input  logic b,     // second operand bit
  input  logic cin,   // carry in
  output logic sum,   // approximate sum bit
  output logic cout   // approximate carry out
);

  logic cout_n;  // carry stage output (complemented)

  always_comb begin
    cout_n = ~(b | (a & cin));
    sum    = cout_n;   // buffered copy of the complemented carry node
    cout   = ~cout_n;
  end

endmodule
