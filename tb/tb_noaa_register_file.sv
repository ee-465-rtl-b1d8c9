// tb_noaa_register_file: checks the sample window and its sums.
//
// First the ramp 1, 2, ..., 16 is sampled on consecutive edges; after each
// edge Tsum and Tsum_square must equal the sums of the last min(k, 14)
// integers and of their squares (ending at 133 and 1491, where 1 and 2 have
// left the window). Then random temperatures are sampled with a random
// `sample` strobe, including full-scale values, and the sums are compared
// with a queue model; with the strobe low the sums must hold. A reset must
// clear both sums.
module tb_noaa_register_file;
  timeunit 1ns; timeprecision 1ps;

  localparam int WINDOW = 14;

  logic        clk = 1'b0, reset = 1'b1, sample = 1'b0;
  logic [11:0] tn = '0;
  logic [15:0] tsum;
  logic [27:0] tsum_square;

  noaa_register_file dut (.clk, .reset, .sample, .tn, .tsum, .tsum_square);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned win[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic compare();
    longint s = 0, q = 0;
    foreach (win[i]) begin
      s += longint'(win[i]);
      q += longint'(win[i]) * longint'(win[i]);
    end
    check(tsum == 16'(s), $sformatf("tsum=%0d expected %0d", tsum, s));
    check(tsum_square == 28'(q), $sformatf("tsum_square=%0d expected %0d", tsum_square, q));
  endtask

  task automatic step(input bit smp, input int t);
    sample = smp;
    tn     = 12'(t);
    @(posedge clk);
    @(negedge clk);
    if (smp) begin
      win.push_front(t);
      if (win.size() > WINDOW) void'(win.pop_back());
    end
    compare();
  endtask

  initial begin
    @(negedge clk);
    @(negedge clk);
    reset = 1'b0;
    check(tsum == 0 && tsum_square == 0, "sums not zero after reset");

    // Ramp: closed-form sums of consecutive integers.
    for (int k = 1; k <= 16; k++) begin
      automatic int lo = (k > WINDOW) ? k - WINDOW + 1 : 1;
      step(1'b1, k);
      check(tsum == 16'((k*(k+1) - (lo-1)*lo) / 2), $sformatf("ramp tsum at %0d", k));
      check(tsum_square == 28'((k*(k+1)*(2*k+1) - (lo-1)*lo*(2*lo-1)) / 6),
            $sformatf("ramp tsum_square at %0d", k));
    end
    check(tsum == 133 && tsum_square == 1491, "ramp end values");

    // Random samples, random strobe, full scale included.
    for (int k = 0; k < 500; k++) begin
      automatic int t = ($urandom_range(0, 7) == 0) ? 4095 : $urandom_range(0, 4095);
      step($urandom_range(0, 3) != 0, t);
    end
    // Full-scale window: largest sums.
    for (int k = 0; k < WINDOW; k++) step(1'b1, 4095);
    check(tsum == 16'(14 * 4095) && tsum_square == 28'(14 * 4095 * 4095), "full-scale sums");

    // Reset clears the window.
    reset = 1'b1;
    @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    win.delete();
    compare();
    step(1'b1, 100);

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
