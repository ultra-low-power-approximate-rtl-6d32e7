// CMA: accurate one-bit full adder, modelled on the 24-transistor mirror adder.
//
// The mirror adder produces complemented outputs. Its first stage forms the
// inverted carry, cout_n = ~(A&B | Cin&(A|B)). Its second stage reuses that
// node: sum_n = ~(((A|B|Cin) & cout_n) | (A&B&Cin)), where cout_n high means
// "no carry". Output inverters restore true-polarity sum and cout. The two-stage
// structure follows the published circuit; this RTL keeps the complemented
// internal nodes only so that the approximate cells can be read side by side
// with it. Purely combinational: no clock, no state.
module cma (
  input  logic a,     // first operand bit
  input  logic b,     // second operand bit
  input  logic cin,   // carry in
  output logic sum,   // a + b + cin, bit 0
  output logic cout   // a + b + cin, bit 1
);

  logic cout_n;  // carry stage output (complemented)
  logic sum_n;   // sum stage output (complemented)

  always_comb begin
    cout_n = ~((a & b) | (cin & (a | b)));
    sum_n  = ~(((a | b | cin) & cout_n) | (a & b & cin));
    sum    = ~sum_n;
    cout   = ~cout_n;
  end

endmodule
