// pa_loop_model: behavioural model (testbench only) of the analog part of the
// power control loop outside the digital controller: the 10-bit DAC, its
// output clamp switch, the power amplifier, the coupler/detector and the 8-bit
// ADC.
//   DAC:      0 V when powered off, else 0.3 V + code * 2.1 V / 1024
//   switch:   clamped -> 0 V at the PA control input
//   RC filter: 2 ns time constant against a 205 ns sample period, so it is
//             treated as settled within the sample
//   PA + coupler + detector: detector voltage rises linearly, DET_SLOPE volts
//             per volt of control voltage, from 0.9 V to PA saturation at 2.2 V
//             (the PA's measured curve is not available; only its end points)
//   ADC:      floor(v * 255 / 1.9 V), one clock of conversion delay; unipolar
//             0..255 over 0..1.9 V, bipolar -128..127 over -0.95..+0.95 V
//             (two's complement), the same scale
// `force_en` replaces the ADC result with `force_code` for tests of the
// feedback path; `inject_en` replaces the detector voltage at the ADC input
// with the DC voltage `inject_v` (the ADC test, whose expected codes are
// 0x43 for 500 mV, 0xBC for -500 mV, and so on).
module pa_loop_model #(
  parameter real DET_SLOPE = 1.5
) (
  input  logic       clk,
  input  logic [9:0] dac_code,
  input  logic       dac_power,
  input  logic       dac_clamp,
  input  logic       force_en,
  input  logic [7:0] force_code,
  input  logic       inject_en,
  input  real        inject_v,
  input  logic       bipolar,
  output logic [7:0] adc_sample,
  output real        v_ctl
);
  real v_det;
  always_comb begin
    v_ctl = 0.0;
    if (dac_power && !dac_clamp) v_ctl = 0.3 + real'(dac_code) * 2.1 / 1024.0;
    if (v_ctl < 0.9)      v_det = 0.0;
    else if (v_ctl > 2.2) v_det = DET_SLOPE * 1.3;
    else                  v_det = DET_SLOPE * (v_ctl - 0.9);
  end
  initial adc_sample = 8'd0;
  always @(posedge clk) begin
    int c;
    c = int'($floor((inject_en ? inject_v : v_det) * 255.0 / 1.9));
    if (bipolar) begin
      if (c > 127)  c = 127;
      if (c < -128) c = -128;
    end else begin
      if (c > 255)  c = 255;
      if (c < 0)    c = 0;
    end
    adc_sample <= force_en ? force_code : 8'(c);
  end
endmodule
