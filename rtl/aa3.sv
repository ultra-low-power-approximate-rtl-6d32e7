// AA3: approximate adder 3, a 16-bit adder whose bits 11..0 are AMA3
// approximate full adders and whose bits 15..12 are accurate mirror adders
// (CMA), rippling the carry from the approximate part into the accurate part.
//
// The published transistor count of this adder is 4 x 28 for the accurate
// cells plus 12 x the AMA3 count, which is what fixes the 12/4 split used
// here. Bit 0 has no carry in; the carry out of bit 15 is brought out as cout,
// so {cout, sum} is the 17-bit result (both are this implementation's
// choices). Purely combinational: the result follows the operands after the
// ripple delay of the chain.
module aa3
  import approx_adder_pkg::*;
#(
  parameter int unsigned WIDTH       = ADDER_WIDTH,                    // total bits
  parameter int unsigned APPROX_BITS = ADDER_APPROX_BITS   // low bits on AMA3
) (
  input  logic [WIDTH-1:0] a,     // first operand
  input  logic [WIDTH-1:0] b,     // second operand
  output logic [WIDTH-1:0] sum,   // approximate sum
  output logic             cout   // carry out of the top bit
);

  hybrid_adder #(
    .WIDTH      (WIDTH),
    .APPROX_BITS(APPROX_BITS),
    .APPROX     (FA_AMA3)
  ) u_adder (
    .a   (a),
    .b   (b),
    .sum (sum),
    .cout(cout)
  );

endmodule
