// noaa_div_round: the single division of the unit, with rounding.
//
// The dividend arrives already doubled (shifted left one bit), so the integer
// quotient q = floor(dividend/divisor) is twice the wanted value x, truncated.
// The result is q/2 rounded half up: the upper bits of q plus its least
// significant bit, i.e. round(x) = (q >> 1) + q[0]. The quotient is kept to
// TW+1 bits and the result to TW bits, both by truncation; for the data the
// unit is meant for (averages of TW-bit samples and standard deviations
// seeded with the previous one) the values stay in range.
//
// A zero divisor, which the datapath only produces if a TW-bit result has
// wrapped to zero and is then used as the guess, gives a result of zero.
// This is a choice of this implementation.
//
// Purely combinational. From the design: the doubled dividend, the
// one-division structure and the round-half-up on the extra quotient bit.
module noaa_div_round #(
  parameter int TW   = 12,  // result width
  parameter int NUMW = 33,  // dividend width
  parameter int DENW = 22   // divisor width
) (
  input  logic [NUMW-1:0] dividend,  // 2 * value to divide
  input  logic [DENW-1:0] divisor,
  output logic [TW-1:0]   rounded    // (dividend/divisor)/2 rounded half up
);

  logic [TW:0] quotient;  // floor(dividend/divisor), truncated to TW+1 bits

  always_comb begin
    if (divisor == '0)
      quotient = '0;
    else
      quotient = (TW+1)'(dividend / NUMW'(divisor));
    rounded = quotient[TW:1] + TW'(quotient[0]);
  end

endmodule
