// adc_gain: feedback-path gain between the ADC (or the digital loop back) and
// the error node, H(z) = A with A one of the document's eight settings
// 3/4, 7/8, 1, 1 1/8, 1 1/4, 1 1/2, 1 3/4, 2 (Table 8), each k/8.
//
// Input and output are signed nits with 4 fraction bits (Q.4), so an ADC sample
// (whole nits, shifted up by 4) is scaled exactly; the division by 8 rounds
// toward minus infinity for loop-back values that carry fraction bits.
// Purely combinational.
module adc_gain
  import pac_pkg::*;
(
  input  logic [2:0]             cfg,
  input  logic signed [FB_W-1:0] x,
  output logic signed [FB_W:0]   y
);
  logic signed [FB_W+5:0] p;
  assign p = (FB_W+6)'(x) * $signed({1'b0, adc_gain_k(cfg)});
  assign y = (FB_W+1)'(p >>> 3);
endmodule
