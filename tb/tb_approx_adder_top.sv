// End-to-end testbench for the approximate adder family at its default size
// (16-bit adders, 12 approximate low bits). It runs the error-metric
// experiment the adders were characterised with: one million random operand
// pairs, applied to AA1, AA2 and AA3 at once. Every result is compared with a
// bit-serial reference built from the cell truth tables, and the error
// distance against the exact sum is accumulated per adder.
//
// Reported per adder: error rate, mean error distance, mean squared error and
// PSNR (peak = 2^17 - 1, the largest 17-bit result). Checked: every result,
// and the published ranking of the three adders, i.e. AA1 has the lowest mean
// error and mean squared error, and AA3 has a lower mean squared error than
// AA2. Counted, and required to happen at least once per adder: an
// approximation error, a carry from the approximate into the accurate part,
// and a carry out of bit 15.
module tb_approx_adder_top;
  import tb_approx_ref_pkg::*;

  localparam int W       = 16;
  localparam int K       = 12;
  localparam int NVEC    = 1_000_000;
  localparam int NADDERS = 3;

  logic [W-1:0] a, b;
  logic [W-1:0] sum_aa1, sum_aa2, sum_aa3;
  logic         cout_aa1, cout_aa2, cout_aa3;

  int checks = 0, failures = 0;

  // per-adder statistics, index 0..2 = AA1..AA3
  longint n_err       [NADDERS];
  longint n_mid_carry [NADDERS];
  longint n_cout      [NADDERS];
  real    sum_abs_err [NADDERS];
  real    sum_sq_err  [NADDERS];
  real    med         [NADDERS];
  real    mse         [NADDERS];

  approx_adder_top dut (
    .a(a), .b(b),
    .sum_aa1(sum_aa1), .cout_aa1(cout_aa1),
    .sum_aa2(sum_aa2), .cout_aa2(cout_aa2),
    .sum_aa3(sum_aa3), .cout_aa3(cout_aa3)
  );

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int idx, logic [W:0] got, logic [W-1:0] x, logic [W-1:0] y);
    longint unsigned want;
    bit              cmid;
    longint          err;
    want = ref_add(idx + 1, W, K, longint'(x), longint'(y), cmid);
    checks++;
    if (got != want[W:0]) begin
      failures++;
      if (failures < 10) $display("AA%0d: %h + %h gave %h, want %h", idx + 1, x, y, got, want[W:0]);
    end
    err = longint'(got) - longint'(x) - longint'(y);
    if (err != 0) n_err[idx]++;
    if (cmid) n_mid_carry[idx]++;
    if (got[W]) n_cout[idx]++;
    sum_abs_err[idx] += real'((err < 0) ? -err : err);
    sum_sq_err[idx]  += real'(err) * real'(err);
  endtask

  initial begin
    real peak;
    for (int i = 0; i < NADDERS; i++) begin
      n_err[i] = 0; n_mid_carry[i] = 0; n_cout[i] = 0;
      sum_abs_err[i] = 0.0; sum_sq_err[i] = 0.0;
    end

    for (int v = 0; v < NVEC; v++) begin
      a = W'($urandom);
      b = W'($urandom);
      #1;
      check_one(0, {cout_aa1, sum_aa1}, a, b);
      check_one(1, {cout_aa2, sum_aa2}, a, b);
      check_one(2, {cout_aa3, sum_aa3}, a, b);
    end

    peak = real'((1 << (W + 1)) - 1);
    for (int i = 0; i < NADDERS; i++) begin
      med[i] = sum_abs_err[i] / real'(NVEC);
      mse[i] = sum_sq_err[i] / real'(NVEC);
      $display("AA%0d: error rate %0.4f  mean error distance %0.2f  MSE %0.1f  PSNR %0.2f dB",
               i + 1, real'(n_err[i]) / real'(NVEC), med[i], mse[i],
               10.0 * $log10(peak * peak / mse[i]));
      $display("AA%0d: approximation errors %0d, carries into bit %0d %0d, carries out %0d",
               i + 1, n_err[i], K, n_mid_carry[i], n_cout[i]);
      checks++;
      if (n_err[i] == 0 || n_mid_carry[i] == 0 || n_cout[i] == 0) begin
        failures++;
        $display("AA%0d: a mechanism never occurred", i + 1);
      end
    end

    // published ranking of the adders
    checks++;
    if (!(med[0] < med[1] && med[0] < med[2])) begin
      failures++;
      $display("AA1 does not have the lowest mean error");
    end
    checks++;
    if (!(mse[0] < mse[2] && mse[2] < mse[1])) begin
      failures++;
      $display("mean squared error not ranked AA1 < AA3 < AA2");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
