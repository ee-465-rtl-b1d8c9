// tb_noaa_module: end-to-end test of the moving-statistics unit at its
// default sizes (window 14, 12-bit temperatures).
//
// Phase 1 plays the 100-sample reference case: each word of
// tb/noaa_data_100.hex holds a request mode, a temperature and the result
// published for that sample. Phase 2 resets the unit in mid-stream and plays
// randomly generated segments (random modes, runs of one mode, constant and
// narrow-spread temperatures, full-range temperatures).
//
// Every result is compared with a reference model written directly from the
// formulas: a queue holding the last 14 samples, average
// round(Tsum/N) = floor((2*Tsum + N) / (2N)), and standard deviation
// floor((2*num + den) / (2*den)) mod 2^12 with num = N^2 s^2 + N*Tsum_square
// - Tsum^2, den = 2 N^2 s, s the last deviation produced (1024 after reset).
// In phase 1 it is also compared with the published value.
//
// Timing checks: `sample` is low in the first cycle after reset and high
// after it; the result of a sample taken at edge E appears with `done` high
// right after edge E+2 and not earlier, i.e. one result per clock with a
// latency of two clocks.
//
// Mechanisms counted, each must occur: average and deviation requests, a
// switch between modes, back-to-back deviations (guess taken from the
// divider), the window filling and dropping its oldest sample, a result
// rounded up, and a reset in mid-stream.
module tb_noaa_module;
  timeunit 1ns; timeprecision 1ps;

  localparam int WINDOW = 14;
  localparam int NDATA  = 100;
  localparam int NRAND  = 4000;

  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic        mode = 1'b0;
  logic [11:0] tn = '0;
  logic        sample, done;
  logic [11:0] avg_sd;

  noaa_module dut (.clk, .reset, .mode, .tn, .sample, .done, .avg_sd);

  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_avg = 0, n_sd = 0, n_switch = 0, n_sd_b2b = 0, n_evict = 0,
      n_round_up = 0, n_mid_reset = 0, n_doc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- reference model ----
  int unsigned win[$];
  longint      sigma;
  bit          prev_mode_valid;
  bit          prev_mode;

  function automatic int model_step(input int t, input bit m, output bit rounded_up);
    longint ts, tq, nn, num, den, r;
    win.push_front(t);
    if (win.size() > WINDOW) begin
      void'(win.pop_back());
      n_evict++;
    end
    nn = longint'(win.size());
    ts = 0; tq = 0;
    foreach (win[i]) begin
      ts += longint'(win[i]);
      tq += longint'(win[i]) * win[i];
    end
    if (!m) begin
      num = ts; den = nn;
    end else begin
      num = nn*nn*sigma*sigma + nn*tq - ts*ts;
      den = 2*nn*nn*sigma;
    end
    if (den == 0) begin
      r = 0; rounded_up = 0;
    end else begin
      r = (2*num + den) / (2*den);
      rounded_up = (r != num / den);
      r = r % 4096;
    end
    if (m) sigma = r;
    return int'(r);
  endfunction

  // ---- stimulus and checking ----
  typedef struct { int cyc; int exp; int doc; } pend_t;
  pend_t pend[$];
  int    cyc = 0;      // rising edges so far

  logic [27:0] data [NDATA];

  // Checks the outputs seen after the last edge.
  task automatic check_outputs();
    if (pend.size() > 0 && pend[0].cyc + 2 == cyc) begin
      pend_t p = pend.pop_front();
      check(done == 1'b1, $sformatf("done low for the sample taken at edge %0d", p.cyc));
      check(avg_sd == 12'(p.exp),
            $sformatf("avg_sd=%0d expected %0d (sample at edge %0d)", avg_sd, p.exp, p.cyc));
      if (p.doc >= 0) begin
        check(avg_sd == 12'(p.doc),
              $sformatf("avg_sd=%0d published %0d", avg_sd, p.doc));
        n_doc++;
      end
    end else begin
      // Nothing is due: the pipeline has not filled yet.
      check(done == 1'b0, "done high with no result due");
    end
  endtask

  // Drives one sample for the coming edge and records its expected result.
  task automatic drive(input int t, input bit m, input int doc);
    bit ru;
    int e;
    tn   = 12'(t);
    mode = m;
    if (prev_mode_valid && prev_mode != m) n_switch++;
    if (prev_mode_valid && prev_mode && m) n_sd_b2b++;
    prev_mode_valid = 1'b1;
    prev_mode       = m;
    if (m) n_sd++; else n_avg++;
    e = model_step(t, m, ru);
    if (ru) n_round_up++;
    pend.push_back('{cyc: cyc + 1, exp: e, doc: doc});
  endtask

  task automatic tick();
    @(posedge clk);
    cyc++;
    @(negedge clk);
    check_outputs();
  endtask

  task automatic do_reset(input bit mid);
    pend.delete();  // results in flight are dropped by the reset
    reset = 1'b1;
    tick();
    tick();
    check(done == 1'b0 && sample == 1'b0 && avg_sd == '0, "outputs not cleared by reset");
    reset = 1'b0;
    win.delete();
    sigma = 1024;
    prev_mode_valid = 1'b0;
    if (mid) n_mid_reset++;
    tick();
    check(sample == 1'b1, "sample not high one edge after reset");
  endtask

  // One sample per cycle from here on; checks `sample` each time.
  task automatic play(input int t, input bit m, input int doc);
    check(sample == 1'b1, "sample dropped");
    drive(t, m, doc);
    tick();
  endtask

  int seg_kind, seg_left, base, spread;
  bit seg_mode;

  initial begin
    $readmemh("tb/noaa_data_100.hex", data);
    @(negedge clk);
    do_reset(1'b0);
    // Before the first sample reaches stage 2 nothing is flagged.
    check(done == 1'b0, "done high before any sample");

    // Phase 1: reference case.
    for (int k = 0; k < NDATA; k++)
      play(int'(data[k][23:12]), data[k][24], int'(data[k][11:0]));
    for (int k = 0; k < 2; k++) play(0, 1'b0, -1);

    // Phase 2: reset in mid-stream (results still in flight are dropped).
    do_reset(1'b1);
    seg_left = 0;
    for (int k = 0; k < NRAND; k++) begin
      int t;
      bit m;
      if (seg_left == 0) begin
        seg_kind = $urandom_range(0, 4);
        seg_left = $urandom_range(5, 60);
        seg_mode = $urandom_range(0, 1) == 1;
        base     = $urandom_range(0, 4095);
        spread   = $urandom_range(0, 300);
      end
      seg_left--;
      case (seg_kind)
        0: begin t = $urandom_range(0, 4095); m = $urandom_range(0, 1) == 1; end
        1: begin t = $urandom_range(0, 4095); m = seg_mode; end
        2: begin t = base; m = $urandom_range(0, 1) == 1; end
        default: begin
          t = base + $urandom_range(0, spread) - spread / 2;
          if (t < 0) t = 0;
          if (t > 4095) t = 4095;
          m = (seg_kind == 3) ? seg_mode : ($urandom_range(0, 1) == 1);
        end
      endcase
      play(t, m, -1);
    end
    for (int k = 0; k < 2; k++) play(0, 1'b0, -1);
    check(pend.size() <= 2, "results missing at the end");

    $display("published results matched: %0d of %0d", n_doc, NDATA);
    $display("mechanisms: avg=%0d sd=%0d mode_switch=%0d sd_back_to_back=%0d window_evict=%0d round_up=%0d mid_reset=%0d",
             n_avg, n_sd, n_switch, n_sd_b2b, n_evict, n_round_up, n_mid_reset);
    check(n_doc == NDATA, "not every published result was checked");
    check(n_avg > 0, "no average request");
    check(n_sd > 0, "no deviation request");
    check(n_switch > 0, "no mode switch");
    check(n_sd_b2b > 0, "no back-to-back deviation");
    check(n_evict > 0, "window never dropped a sample");
    check(n_round_up > 0, "no result rounded up");
    check(n_mid_reset > 0, "no reset in mid-stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
