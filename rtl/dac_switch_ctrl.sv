// dac_switch_ctrl: control of the switch that clamps the DAC output to ground.
//
// The DAC overshoots when PAC Enable powers it on. Clamping the output only
// while PAC Enable is low lets that overshoot reach the power amplifier, so a
// secondary control signal keeps the clamp closed until the first rising edge
// of Ramp Enable in the burst. The secondary signal is a flip-flop with D tied
// to 1, set by Ramp Enable rising and reset while PAC Enable is low; the clamp
// is NAND(PAC Enable, secondary). This logic is the document's (Figs. 41-42);
// later Ramp Enable pulses in the same burst leave the clamp open.
//
// Implementation: the flip-flop runs on the system clock with an edge
// detector instead of using Ramp Enable as a clock, and the rising edge itself
// also opens the clamp so the switch opens in the cycle Ramp Enable rises.
// `clamp` = 1 means clamped (output held at 0 V). PAC Enable falling closes the
// clamp combinationally, in the same cycle. An assertion checks that the
// clamp is closed whenever PAC Enable is low.
module dac_switch_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic pac_en,
  input  logic ramp_en,
  output logic secondary,
  output logic clamp
);
  logic ramp_q;
  logic rise;

  assign rise = ramp_en && !ramp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ramp_q    <= 1'b0;
      secondary <= 1'b0;
    end else begin
      ramp_q <= ramp_en;
      if (!pac_en)   secondary <= 1'b0;
      else if (rise) secondary <= 1'b1;
    end
  end

  assign clamp = !(pac_en && (secondary || rise));

  // The DAC output never reaches the PA while the DAC is powered off.
  a_clamp_off: assert property (@(posedge clk) !pac_en |-> clamp);
endmodule
