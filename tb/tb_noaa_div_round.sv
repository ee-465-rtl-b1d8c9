// tb_noaa_div_round: checks the division with round-half-up.
//
// With the dividend holding 2*v, the result must be round(v/divisor) =
// floor((2v + divisor) / (2*divisor)) taken modulo 2^12, computed here in
// 64-bit arithmetic. Cases: averages (v up to 14*4095, divisor 1..14),
// random deviations (large v, divisor up to 2^22-1), exact halves that must
// round up, values just below a half that must round down, results of 4095
// and above, and a zero divisor (result 0).
module tb_noaa_div_round;
  timeunit 1ns; timeprecision 1ps;

  logic [32:0] dividend;
  logic [21:0] divisor;
  logic [11:0] rounded;

  noaa_div_round dut (.dividend, .divisor, .rounded);

  int checks = 0, failures = 0, ups = 0, downs = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input longint v, input longint d);
    longint exp;
    dividend = 33'(2 * v);
    divisor  = 22'(d);
    #1;
    if (d == 0) exp = 0;
    else begin
      exp = (2 * v + d) / (2 * d);
      if (exp > v / d) ups++; else downs++;
      exp = exp % 4096;
    end
    check(rounded == 12'(exp),
          $sformatf("%0d/%0d: rounded=%0d expected %0d", v, d, rounded, exp));
  endtask

  initial begin
    for (int k = 0; k < 2000; k++)
      apply($urandom_range(0, 14 * 4095), $urandom_range(1, 14));
    for (int k = 0; k < 2000; k++) begin
      automatic longint d = $urandom_range(1, (1 << 22) - 1);
      automatic longint r = $urandom_range(0, 4095);
      automatic longint v = d * r + $urandom_range(0, int'(d) - 1);
      if (2 * v < (64'd1 << 33)) apply(v, d);
    end
    apply(5, 2);      // 2.5 -> 3
    apply(7, 2);      // 3.5 -> 4
    apply(1383, 1);   // exact
    apply(49, 10);    // 4.9 -> 5
    apply(44, 10);    // 4.4 -> 4
    apply(4095, 1);   // largest in range
    apply(8189, 2);   // 4094.5 -> 4095
    apply(8191, 2);   // 4095.5 -> 4096 -> 0
    apply(100, 0);    // zero divisor
    check(ups > 0 && downs > 0, "rounding directions not both seen");
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
