// Self-checking testbench for the AMA1 approximate full-adder cell: applies
// all eight input combinations and compares sum and carry out with the
// published truth table. It also checks that the cell is wrong exactly where
// that table says it is (against the true one-bit sum a+b+cin).
module tb_ama1;
  import tb_approx_ref_pkg::*;

  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;
  int   wrong_rows = 0;

  ama1 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int row = 0; row < 8; row++) begin
      {a, b, cin} = row[2:0];
      #1;
      checks++;
      if (sum !== tt_sum(1, row) || cout !== tt_carry(1, row)) begin
        failures++;
        $display("row %0d%0d%0d: got sum=%0d cout=%0d, want sum=%0d cout=%0d",
                 a, b, cin, sum, cout, tt_sum(1, row), tt_carry(1, row));
      end
      if ({cout, sum} != 2'(a + b + cin)) wrong_rows++;
    end
    checks++;
    if (wrong_rows != 2) begin
      failures++;
      $display("cell wrong on %0d rows, want %0d", wrong_rows, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
