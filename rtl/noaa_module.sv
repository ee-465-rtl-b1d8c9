// noaa_module: moving average / moving standard deviation of a temperature
// stream.
//
// Every clock after reset the unit takes one TW-bit temperature `tn`
// together with a request `mode` (0: average, 1: standard deviation) and,
// two clock edges later, presents on `avg_sd` the requested statistic of the
// last N = min(n, WINDOW) samples, n being the number of samples since reset.
//
//   average  = round(Tsum / N)
//   std.dev. = round((N^2*s^2 + N*Tsum_square - Tsum^2) / (2*N^2*s))
//
// The second line is one Babylonian square-root step seeded with a guess s.
// The guess is the most recent standard deviation the unit produced (at reset
// SIGMA_INIT), so no variance and no second division are needed.
//
// Pipeline (E_k is the edge that takes sample k; all edges rising):
//   E_k    register file shifts in tn, N counts up, `mode` is kept in mode1.
//   E_k+1  stage 1: the doubled dividend and the divisor are registered,
//          Tsum*2 and N for an average, the calculator outputs for a
//          standard deviation; mode1 moves to mode2.
//   E_k+2  stage 2: the rounded quotient is registered on `avg_sd`, `done`
//          is high from here on, and if mode2 asks for a standard deviation
//          the result also becomes the new guess s.
// A new sample can be taken on every edge, so one result leaves per clock.
//
// Bypass of the guess: when two standard deviations are requested back to
// back, the later one is formed at the edge that stores the earlier one, so
// the calculator takes the earlier result straight from the divider
// (mode1 && mode2) instead of from the guess register.
//
// Operand isolation: the calculator's N, Tsum and Tsum_square inputs are
// muxed between the live values (mode1 = 1) and copies held from the last
// sample (mode1 = 0), so the multipliers do not toggle on average requests.
// The held copies never reach the outputs.
//
// Interface: `reset` is synchronous and active high. `sample` is low in the
// cycle after reset and high afterwards; a sample is taken on every edge where
// it is high. `done` rises with the first result, two edges after the first
// sample, and stays high while results keep coming.
//
// Everything above follows the design, including the 1024 reset guess, the
// one-bit left shift before the division and the rounding. The zero result
// on a zero divisor and the width derivation from WINDOW and TW are choices
// of this implementation.
module noaa_module
  import noaa_pkg::*;
#(
  parameter int          WINDOW     = 14,   // samples in the moving window
  parameter int          TW         = 12,   // temperature and result width
  parameter logic [11:0] SIGMA_INIT = 12'd1024  // guess s after reset
) (
  input  logic          clk,
  input  logic          reset,   // synchronous, active high
  input  logic          mode,    // 0: average, 1: standard deviation
  input  logic [TW-1:0] tn,      // temperature sample
  output logic          sample,  // tn and mode are taken on this edge
  output logic          done,    // avg_sd holds a result
  output logic [TW-1:0] avg_sd   // result for the sample taken two edges ago
);

  localparam int NW   = n_w(WINDOW);
  localparam int SW   = tsum_w(TW, WINDOW);
  localparam int QW   = tsq_w(TW, WINDOW);
  localparam int NUMW = num_w(TW, WINDOW);
  localparam int DENW = den_w(TW, WINDOW);

  // Window sums and sample count.
  logic [SW-1:0] tsum;
  logic [QW-1:0] tsum_square;
  logic [NW-1:0] n;

  noaa_register_file #(.WINDOW(WINDOW), .TW(TW)) u_reg_file (
    .clk, .reset, .sample, .tn,
    .tsum, .tsum_square
  );

  noaa_sample_counter #(.WINDOW(WINDOW)) u_counter (
    .clk, .reset, .sample, .n
  );

  // Request pipeline. calc_state[0]: stage 1 has data; calc_state[1]: stage 2
  // has data. Both only matter for the first two edges after reset.
  mode_e      mode1, mode2;
  logic [1:0] calc_state;

  // Operand isolation of the calculator.
  logic [NW-1:0] n_hold, n_calc;
  logic [SW-1:0] tsum_hold, tsum_calc;
  logic [QW-1:0] tsum_square_hold, tsum_square_calc;

  logic [TW-1:0] sigma_hat, sigma_hat_calc;

  logic [NUMW-1:0] numerator, numerator_store;
  logic [DENW-1:0] denominator, denominator_store;
  logic [TW-1:0]   quotient_rounded;

  always_comb begin
    n_calc           = (mode1 == MODE_SD) ? n           : n_hold;
    tsum_calc        = (mode1 == MODE_SD) ? tsum        : tsum_hold;
    tsum_square_calc = (mode1 == MODE_SD) ? tsum_square : tsum_square_hold;
    // Back-to-back standard deviations: use the result now leaving stage 2.
    sigma_hat_calc   = (mode1 == MODE_SD && mode2 == MODE_SD) ? quotient_rounded
                                                               : sigma_hat;
  end

  noaa_calc_num_den #(.WINDOW(WINDOW), .TW(TW)) u_calc (
    .sigma_hat   (sigma_hat_calc),
    .n           (n_calc),
    .tsum        (tsum_calc),
    .tsum_square (tsum_square_calc),
    .numerator,
    .denominator
  );

  noaa_div_round #(.TW(TW), .NUMW(NUMW), .DENW(DENW)) u_div (
    .dividend (numerator_store),
    .divisor  (denominator_store),
    .rounded  (quotient_rounded)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      sample            <= 1'b0;
      done              <= 1'b0;
      avg_sd            <= '0;
      sigma_hat         <= TW'(SIGMA_INIT);
      calc_state        <= 2'b00;
      mode1             <= MODE_AVG;
      mode2             <= MODE_AVG;
      numerator_store   <= '0;
      denominator_store <= '0;
      n_hold            <= '0;
      tsum_hold         <= '0;
      tsum_square_hold  <= '0;
    end else begin
      sample <= 1'b1;  // a sample on every clock

      // Take the sample (the register file and counter use the same strobe).
      if (sample) begin
        n_hold           <= n_calc;
        tsum_hold        <= tsum_calc;
        tsum_square_hold <= tsum_square_calc;
        mode1            <= mode_e'(mode);
        calc_state[0]    <= 1'b1;
      end

      // Stage 1: choose and register dividend (doubled) and divisor.
      if (calc_state[0]) begin
        if (mode1 == MODE_SD) begin
          numerator_store   <= numerator << 1;
          denominator_store <= denominator;
        end else begin
          numerator_store   <= NUMW'(tsum) << 1;
          denominator_store <= DENW'(n);
        end
        mode2         <= mode1;
        calc_state[1] <= 1'b1;
      end

      // Stage 2: divide, round, output; keep a new deviation as the guess.
      if (calc_state[1]) begin
        if (mode2 == MODE_SD)
          sigma_hat <= quotient_rounded;
        avg_sd <= quotient_rounded;
        done   <= 1'b1;
      end else begin
        done <= 1'b0;
      end
    end
  end

  // The count never passes the window length.
  a_n_in_window: assert property (@(posedge clk) disable iff (reset) n <= NW'(WINDOW));
  // A result is only flagged once both stages have been filled.
  a_done_after_fill: assert property (@(posedge clk) disable iff (reset)
                                      done |-> calc_state == 2'b11);

endmodule
