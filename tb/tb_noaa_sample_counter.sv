// tb_noaa_sample_counter: N must count sampled edges only, stop at 14 and
// clear on reset. A random strobe drives it for several hundred edges and N
// is compared with min(strobes since reset, 14) after every edge.
module tb_noaa_sample_counter;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0, reset = 1'b1, sample = 1'b0;
  logic [3:0] n;

  noaa_sample_counter dut (.clk, .reset, .sample, .n);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, taken = 0, saturated = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    @(negedge clk);
    @(negedge clk);
    reset = 1'b0;
    check(n == 0, "n not cleared by reset");
    for (int k = 0; k < 600; k++) begin
      if (k == 300) begin
        reset = 1'b1;
        @(posedge clk);
        @(negedge clk);
        reset = 1'b0;
        taken = 0;
        check(n == 0, "n not cleared by reset in mid-count");
      end
      sample = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      @(negedge clk);
      if (sample) taken++;
      if (taken > 14) saturated++;
      check(n == 4'((taken < 14) ? taken : 14),
            $sformatf("n=%0d expected %0d", n, (taken < 14) ? taken : 14));
    end
    check(saturated > 0, "count never reached saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
