// Hybrid approximate ripple adder: WIDTH full-adder cells in a carry chain,
// the low APPROX_BITS of them approximate cells of kind APPROX, the rest
// accurate mirror adders (CMA).
//
// The approximate cells trade accuracy for fewer transistors on the low bits,
// where an error costs little; the accurate cells on the high bits keep the
// large-magnitude part of the result right. The carry out of the top
// approximate cell feeds the carry in of the lowest accurate cell. Bit 0 has
// no carry in (tied to 0) and the carry out of the top cell is brought out as
// cout, so {cout, sum} is the WIDTH+1-bit result.
//
// The split of approximate cells on the low bits and accurate cells on the
// high bits is the published architecture; the tied-off carry in and the
// exposed carry out are this implementation's choices. Purely combinational.
module hybrid_adder
  import approx_adder_pkg::*;
#(
  parameter int unsigned WIDTH       = ADDER_WIDTH,   // total bits
  parameter int unsigned APPROX_BITS = ADDER_APPROX_BITS,  // low bits on approximate cells
  parameter fa_kind_e    APPROX      = FA_AMA1        // cell used on the low bits
) (
  input  logic [WIDTH-1:0] a,     // first operand
  input  logic [WIDTH-1:0] b,     // second operand
  output logic [WIDTH-1:0] sum,   // approximate sum
  output logic             cout   // carry out of the top bit
);

  // The approximate part cannot be wider than the adder.
  if (APPROX_BITS > WIDTH) begin : g_bad_split
    $error("hybrid_adder: APPROX_BITS (%0d) exceeds WIDTH (%0d)", APPROX_BITS, WIDTH);
  end

  // carry[i] is the carry into bit i
  logic [WIDTH:0] carry;

  assign carry[0] = 1'b0;
  assign cout     = carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i >= APPROX_BITS || APPROX == FA_CMA) begin : g_acc
      cma u_fa (.a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1]));
    end else if (APPROX == FA_AMA1) begin : g_ama1
      ama1 u_fa (.a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1]));
    end else if (APPROX == FA_AMA2) begin : g_ama2
      ama2 u_fa (.a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1]));
    end else begin : g_ama3
      ama3 u_fa (.a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1]));
    end
  end

endmodule
