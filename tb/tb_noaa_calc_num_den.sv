// tb_noaa_calc_num_den: checks the numerator N^2 s^2 + N*Tsum_square -
// Tsum^2 and the denominator 2 N^2 s against 64-bit arithmetic.
//
// Inputs come from random windows of 1 to 14 samples (so the numerator is
// never negative), with random guesses s, plus the corner cases that set the
// widths: a full-scale window with the largest guess (largest numerator),
// N = 14 with s = 4095 (largest denominator), and s = 0.
module tb_noaa_calc_num_den;
  timeunit 1ns; timeprecision 1ps;

  logic [11:0] sigma_hat;
  logic [3:0]  n;
  logic [15:0] tsum;
  logic [27:0] tsum_square;
  logic [32:0] numerator;
  logic [21:0] denominator;

  noaa_calc_num_den dut (.sigma_hat, .n, .tsum, .tsum_square, .numerator, .denominator);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // Applies a window given by its count and sums, then compares.
  task automatic apply(input int cnt, input longint s, input longint q, input int sh);
    longint num, den;
    n = 4'(cnt); tsum = 16'(s); tsum_square = 28'(q); sigma_hat = 12'(sh);
    #1;
    num = longint'(cnt) * cnt * sh * sh + longint'(cnt) * q - s * s;
    den = 2 * longint'(cnt) * cnt * sh;
    check(numerator == 33'(num),
          $sformatf("numerator=%0d expected %0d (N=%0d s=%0d)", numerator, num, cnt, sh));
    check(denominator == 22'(den),
          $sformatf("denominator=%0d expected %0d (N=%0d s=%0d)", denominator, den, cnt, sh));
    check(num >= 0 && num < (64'd1 << 33), "numerator out of its 33-bit range");
  endtask

  initial begin
    for (int k = 0; k < 2000; k++) begin
      automatic int cnt = $urandom_range(1, 14);
      automatic longint s = 0, q = 0;
      for (int i = 0; i < cnt; i++) begin
        automatic int t = $urandom_range(0, 4095);
        s += t;
        q += longint'(t) * t;
      end
      apply(cnt, s, q, $urandom_range(0, 4095));
    end
    // Full scale, largest guess.
    apply(14, 14 * 4095, 14 * longint'(4095) * 4095, 4095);
    // Half the window at 0 and half at 4095: largest variance.
    apply(14, 7 * 4095, 7 * longint'(4095) * 4095, 4095);
    // Zero guess.
    apply(5, 1000, 300000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
