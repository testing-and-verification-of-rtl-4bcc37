// power_shaper: piecewise-linear gain that compensates for the power amplifier's
// flattening control curve near saturation.
//
// With input x, gain g and thresholds t1 < t2 < t3 the output is (document,
// Eq. 7 and Fig. 9):
//   x                                                   x <= t1
//   (x-t1) g/4 + t1                                     t1 < x <= t2
//   (x-t2) g/2 + (t2-t1) g/4 + t1                       t2 < x <= t3
//   (x-t3) g   + (t3-t2) g/2 + (t2-t1) g/4 + t1         x > t3
// g is one of 8, 12, 16, 20 and each threshold one of 0, 32, ..., 992 nits,
// both as the document gives them. The sum is formed as 4*Y in the Q10.11
// input format, so it is exact, and then truncated to whole nits and saturated
// to the 10-bit DAC range. A result below zero, possible only with thresholds
// out of order, is clamped to zero (this design's choice). Combinational.
module power_shaper
  import pac_pkg::*;
(
  input  logic [1:0]       gain_cfg,
  input  logic [4:0]       thr1,
  input  logic [4:0]       thr2,
  input  logic [4:0]       thr3,
  input  logic [DG_W-1:0]  x,        // Q10.11 nits
  output logic [MAG_W-1:0] y,        // whole nits
  output logic [1:0]       segment   // 0: below t1 ... 3: above t3
);
  localparam int unsigned W = 34;
  logic signed [W-1:0] xs, t1, t2, t3, g, y4, yn;

  assign xs = W'(x);
  assign t1 = W'(thr1) <<< (5 + DG_FB);
  assign t2 = W'(thr2) <<< (5 + DG_FB);
  assign t3 = W'(thr3) <<< (5 + DG_FB);
  assign g  = W'(shaper_gain(gain_cfg));

  always_comb begin
    if (xs > t3) begin
      segment = 2'd3;
      y4 = (xs - t3) * 4 * g + (t3 - t2) * 2 * g + (t2 - t1) * g + 4 * t1;
    end else if (xs > t2) begin
      segment = 2'd2;
      y4 = (xs - t2) * 2 * g + (t2 - t1) * g + 4 * t1;
    end else if (xs > t1) begin
      segment = 2'd1;
      y4 = (xs - t1) * g + 4 * t1;
    end else begin
      segment = 2'd0;
      y4 = 4 * xs;
    end
    yn = y4 >>> (2 + DG_FB);
    if (yn < 0)                       y = '0;
    else if (yn > W'((1 << MAG_W) - 1)) y = '1;
    else                              y = yn[MAG_W-1:0];
  end
endmodule
