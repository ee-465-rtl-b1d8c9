// noaa_sample_counter: the sample count N used as the divisor of the average.
//
// N counts the samples taken since reset and stops at WINDOW, the depth of
// the sample window, so that it always equals the number of samples the
// window sums cover: N = min(n, WINDOW). It advances on a rising clock edge
// with `sample` high and N below WINDOW, the same edge on which the register
// file takes the sample. Reset is synchronous and active high and clears N.
//
// From the design: the up counter enabled by the sample strobe and the
// "N < 14" comparison that stops it.
module noaa_sample_counter
  import noaa_pkg::*;
#(
  parameter int WINDOW = 14  // saturation value
) (
  input  logic                       clk,
  input  logic                       reset,   // synchronous, active high
  input  logic                       sample,  // a sample is taken on this edge
  output logic [n_w(WINDOW)-1:0]     n        // min(samples since reset, WINDOW)
);

  localparam int NW = n_w(WINDOW);

  always_ff @(posedge clk) begin
    if (reset)
      n <= '0;
    else if (sample && (n < NW'(WINDOW)))
      n <= n + 1'b1;
  end

endmodule
