// Self-checking testbench for AA1, the 16-bit adder with AMA1 cells on bits
// 11..0 and accurate cells on bits 15..12. Compares {cout, sum} with a
// bit-serial reference built from the cell truth tables, on directed corner
// cases and on random operands. It also checks two properties that follow
// from the architecture: operands whose low 12 bits are zero add exactly, and
// the high 4 bits are the exact sum of the operands' high bits plus the carry
// that leaves the approximate part.
module tb_aa1;
  import tb_approx_ref_pkg::*;

  localparam int W = 16;
  localparam int K = 12;
  // Result of the low 12 bits when both operands are zero there: AMA1 cells are exact for 0+0 with no carry in, so the result is exact.
  localparam logic [K-1:0] ZERO_LOW = '0;

  logic [W-1:0] a, b, sum;
  logic         cout;
  int           checks = 0, failures = 0;
  int           n_mid_carry = 0, n_wrong = 0;

  aa1 dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    longint unsigned want;
    bit              cmid;
    logic [W:0]      got;
    a = x;
    b = y;
    #1;
    got  = {cout, sum};
    want = ref_add(1, W, K, longint'(x), longint'(y), cmid);
    checks++;
    if (got != want[W:0]) begin
      failures++;
      if (failures < 10)
        $display("%h + %h: got %h, want %h", x, y, got, want[W:0]);
    end
    // high part: exact sum of high operand bits plus the carry from the low part
    checks++;
    if (got[W:K] != (W-K+1)'(x[W-1:K] + y[W-1:K] + cmid)) begin
      failures++;
      if (failures < 10) $display("%h + %h: high part %h wrong", x, y, got[W:K]);
    end
    if (x[K-1:0] == '0 && y[K-1:0] == '0) begin
      checks++;
      if (got != (W+1)'(x + y + ZERO_LOW)) begin
        failures++;
        $display("%h + %h: low bits zero but result %h", x, y, got);
      end
    end
    if (cmid) n_mid_carry++;
    if (got != (W+1)'(x + y)) n_wrong++;
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 16'h0001);
    apply(16'hF000, 16'h1000);
    apply(16'h7000, 16'h9000);
    apply(16'h0FFF, 16'h0001);
    apply(16'h0FFF, 16'h0FFF);
    apply(16'h0AAA, 16'h0555);
    apply(16'h5555, 16'hAAAA);
    for (int i = 0; i < W; i++) apply(16'(1) << i, 16'(1) << i);
    for (int i = 0; i < 100000; i++) apply(16'($urandom), 16'($urandom));
    // the approximation must actually be exercised
    checks++;
    if (n_wrong == 0 || n_mid_carry == 0) begin
      failures++;
      $display("no approximation error (%0d) or no carry into the accurate part (%0d)",
               n_wrong, n_mid_carry);
    end
    $display("inexact results: %0d, carries into bit %0d: %0d", n_wrong, K, n_mid_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
