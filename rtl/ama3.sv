// AMA3: approximate mirror adder 3. The accurate carry equals operand A in six
// of the eight input combinations, so the carry out is taken straight from A
// and no carry logic is left; the sum is taken from operand B. The carry in is
// not used at all, which breaks the carry chain: a chain of AMA3 cells has no
// ripple delay.
//
// Function (from the published truth table):
//   cout = A    wrong for A,B,Cin = 0,1,1 and 1,0,0
//   sum  = B    wrong for 0,0,1 / 0,1,1 / 1,0,0 / 1,1,0
// The cin port is kept so that the cell drops into the same slot as the other
// full adders; it is intentionally unread. Purely combinational.
module ama3 (
  input  logic a,     // first operand bit
  input  logic b,     // second operand bit
  input  logic cin,   // carry in (not used by this approximation)
  output logic sum,   // approximate sum bit
  output logic cout   // approximate carry out
);

  logic unused_cin;

  always_comb begin
    cout       = a;
    sum        = b;
    unused_cin = cin;
  end

endmodule
