// lpf_integrator: shapes the square-edged ramp store output into the loop
// reference.
//
// While Ramp Enable is high the block is a first-order low-pass filter,
//   y[n] = y[n-1] + A * (x[n-1] - y[n-1])      H(z) = A z^-1 / (1 - (1-A) z^-1)
// which smooths the rising edge of the burst. After Ramp Enable falls it is an
// integrator with a negative coefficient,
//   y[n] = y[n-1] - A * x[n-1]                 H(z) = -A z^-1 / (1 - z^-1)
// so each ramp-down entry sets the slope of a straight segment and the falling
// edge becomes piecewise linear. Both transfer functions and the four values of
// A (Table 5 of the source: 0.0781, 0.0625, 0.0547, 0.0469, taken here as
// 10/128, 8/128, 7/128 and 6/128) are the document's. The output is clamped at
// zero during integration (the document gives no lower bound; a negative power
// reference has no meaning) and cleared while PAC Enable is low.
//
// The state keeps FRAC fraction bits below the nit (default 16, this design's
// choice) so that the filter settles to within one LSB of its input. One
// sample per clock (4.875 MHz); `y` is registered, giving the z^-1 of both
// transfer functions. Output format: Q10.4 nits, 14 bits.
module lpf_integrator
  import pac_pkg::*;
#(
  parameter int unsigned FRAC = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,    // PAC Enable low
  input  logic              lpf_mode, // 1: low-pass filter, 0: integrator
  input  logic [1:0]        coef_cfg,
  input  logic [MAG_W-1:0]  x,
  output logic [LOOP_W-1:0] y
);
  localparam int unsigned SW = MAG_W + FRAC + 8;   // signed working width
  logic [MAG_W+FRAC-1:0] st;                       // state, Q10.FRAC
  logic signed [SW-1:0]  xs, ss, diff, step, nxt;
  logic [4:0]            k;

  assign k    = lpf_coef_k(coef_cfg);
  assign xs   = SW'({x, {FRAC{1'b0}}});
  assign ss   = SW'(st);
  assign diff = lpf_mode ? (xs - ss) : -xs;
  assign step = (diff * $signed({1'b0, k})) >>> 7;
  assign nxt  = ss + step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          st <= '0;
    else if (clear)      st <= '0;
    else if (nxt < 0)    st <= '0;
    else                 st <= nxt[MAG_W+FRAC-1:0];
  end

  assign y = st[MAG_W+FRAC-1 -: LOOP_W];
endmodule
