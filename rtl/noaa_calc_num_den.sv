// noaa_calc_num_den: numerator and denominator of the standard deviation.
//
// One Babylonian square-root step, sqrt(V) ~ (s + V/s)/2 with s a guess of
// the standard deviation, is rewritten with V = Tsum_square/N - (Tsum/N)^2 so
// that only one division remains:
//
//   sigma = (N^2*s^2 + N*Tsum_square - Tsum^2) / (2*N^2*s)
//
// This block forms that numerator and denominator. It is purely
// combinational; the caller registers the results and divides.
//
// N*Tsum_square >= Tsum^2 whenever Tsum and Tsum_square are the sum and sum
// of squares of at most N values, so the numerator is never negative for
// inputs that come from the register file. The numerator fits its width for
// s below 2^TW (see noaa_pkg::num_w).
//
// From the design: the formula, the split into squarers, multipliers and a
// subtractor, and the 12-bit s, 4-bit N, 16/28-bit sums, 33-bit numerator
// and 22-bit denominator at the defaults.
module noaa_calc_num_den
  import noaa_pkg::*;
#(
  parameter int WINDOW = 14,
  parameter int TW     = 12
) (
  input  logic [TW-1:0]                 sigma_hat,    // guess s
  input  logic [n_w(WINDOW)-1:0]        n,            // samples in the window
  input  logic [tsum_w(TW, WINDOW)-1:0] tsum,
  input  logic [tsq_w(TW, WINDOW)-1:0]  tsum_square,
  output logic [num_w(TW, WINDOW)-1:0]  numerator,    // N^2*s^2 + N*Tsum_square - Tsum^2
  output logic [den_w(TW, WINDOW)-1:0]  denominator   // 2*N^2*s
);

  localparam int NUMW = num_w(TW, WINDOW);
  localparam int DENW = den_w(TW, WINDOW);

  logic [NUMW-1:0] n_sq, s_sq;

  always_comb begin
    n_sq        = NUMW'(n) * NUMW'(n);
    s_sq        = NUMW'(sigma_hat) * NUMW'(sigma_hat);
    numerator   = n_sq * s_sq
                + NUMW'(n) * NUMW'(tsum_square)
                - NUMW'(tsum) * NUMW'(tsum);
    denominator = DENW'(2) * DENW'(n_sq) * DENW'(sigma_hat);
  end

endmodule
