// noaa_pkg: shared types and width arithmetic for the moving-statistics
// temperature unit.
//
// The unit keeps a window of the last WINDOW samples of TW-bit unsigned
// temperatures. All datapath widths follow from those two numbers; the
// functions below derive them so that every module agrees. At the default
// WINDOW = 14 and TW = 12 they give the widths the design was specified with:
// Tsum 16 bits, Tsum_square 28 bits, N 4 bits, numerator 33 bits and
// denominator 22 bits.
package noaa_pkg;

  // Output selection requested with each sample.
  typedef enum logic {
    MODE_AVG = 1'b0,  // moving average
    MODE_SD  = 1'b1   // moving standard deviation
  } mode_e;

  // Width of the sample count N (0..WINDOW).
  function automatic int n_w(int window);
    return $clog2(window + 1);
  endfunction

  // Width of the sum of WINDOW samples.
  function automatic int tsum_w(int tw, int window);
    return tw + $clog2(window);
  endfunction

  // Width of the sum of WINDOW squared samples.
  function automatic int tsq_w(int tw, int window);
    return 2 * tw + $clog2(window);
  endfunction

  // Width of N^2*s^2 + N*Tsum_square - Tsum^2 after the one-bit left shift
  // applied before the division. The unshifted value is below
  // N^2 * 2^(2*TW) * 5/4 (s below 2^TW, and the variance term at most a
  // quarter of that), so the shifted value is below N^2 * 2^(2*TW) * 5/2.
  // That fits 2*TW + 2*n_w + 1 bits when 5*N^2 <= 4*2^(2*n_w), as it does at
  // the default window (5*196 <= 1024, 33 bits); otherwise one bit is added.
  function automatic int num_w(int tw, int window);
    return 2 * tw + 2 * n_w(window) + 1
           + ((5 * window * window > 4 * (1 << (2 * n_w(window)))) ? 1 : 0);
  endfunction

  // Width of 2*N^2*s (22 bits at the defaults).
  function automatic int den_w(int tw, int window);
    return tw + 2 * n_w(window) + 2;
  endfunction

endpackage
