// noaa_register_file: sample window and running sums.
//
// Two shift registers, WINDOW stages each, hold the most recent samples and
// their squares. On a rising clock edge with `sample` high the new
// temperature `tn` enters stage 0 (and tn*tn enters stage 0 of the square
// chain), every stage moves one place down, and the value in the last stage is
// dropped. `tsum` and `tsum_square` are the combinational sums of all stages,
// so they show the new window right after the edge that took the sample.
// Stages that have not yet received a sample hold zero, so before the window
// is full the sums cover only the samples taken since reset.
//
// Reset is synchronous and active high, and clears every stage. With `sample`
// low the window holds.
//
// From the design: the 14-stage depth, the 12/16/28-bit widths, the squaring
// at the input and the discarding of the oldest value. The adder-tree form of
// the sums is left to synthesis.
module noaa_register_file
  import noaa_pkg::*;
#(
  parameter int WINDOW = 14,  // samples kept
  parameter int TW     = 12   // temperature width
) (
  input  logic                             clk,
  input  logic                             reset,        // synchronous, active high
  input  logic                             sample,       // shift in tn on this edge
  input  logic [TW-1:0]                    tn,           // new temperature
  output logic [tsum_w(TW, WINDOW)-1:0]    tsum,         // sum of the window
  output logic [tsq_w(TW, WINDOW)-1:0]     tsum_square   // sum of squares of the window
);

  localparam int SW = tsum_w(TW, WINDOW);
  localparam int QW = tsq_w(TW, WINDOW);

  logic [TW-1:0]   t_q   [WINDOW];  // t_q[0] is the newest sample
  logic [2*TW-1:0] tsq_q [WINDOW];  // squares, same order

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < WINDOW; i++) begin
        t_q[i]   <= '0;
        tsq_q[i] <= '0;
      end
    end else if (sample) begin
      t_q[0]   <= tn;
      tsq_q[0] <= tn * tn;
      for (int i = 1; i < WINDOW; i++) begin
        t_q[i]   <= t_q[i-1];
        tsq_q[i] <= tsq_q[i-1];
      end
    end
  end

  always_comb begin
    tsum        = '0;
    tsum_square = '0;
    for (int i = 0; i < WINDOW; i++) begin
      tsum        = tsum + SW'(t_q[i]);
      tsum_square = tsum_square + QW'(tsq_q[i]);
    end
  end

endmodule
