// pac_top: digital closed-loop transmit power controller for a GSM/DCS power
// amplifier (PA), as it sits inside the mixed-signal companion chip.
//
// The loop, one sample per 4.875 MHz clock:
//
//   ramp_store -> lpf_integrator -(+)-> integrator_limiter -> dac_gain
//                                  ^                             |
//                                  |                       power_shaper -> DAC code
//                        adc_gain <- ADC sample (or, in digital loop back,
//                                    the dac_gain output)
//
// The DAC drives the PA control voltage; a coupler and detector return a
// voltage that the ADC samples. DAC, PA, coupler, detector and ADC are analog
// and outside this module: the DAC code, its power-on (PAC Enable) and its
// output clamp leave through ports, and the 8-bit ADC sample comes in.
// The intra-frame sequencer (ifs) times the burst through three of its 16
// control outputs: PAC Enable powers the loop and clears its state when low,
// Ramp Enable starts the ramp profile and switches the ramp filter between
// low-pass (high) and integrator (low), Calibration Enable captures the ADC
// sample into a monitor register. Bit 0 of the sequencer is taken as Tx Enable.
// dac_switch_ctrl keeps the DAC output clamped from PAC Enable until the first
// Ramp Enable edge, hiding the DAC power-on overshoot from the PA.
//
// All settings live in registers reached over the serial DSP control
// interface (dsp_ctrl_if -> pac_regfile); see pac_regfile for the map. Test
// modes from the document: the ramp store straight to the DAC, the GPIO inputs
// straight to the DAC, and the digital loop back.
//
// The block structure, gains, formats of the stores and the clamp logic follow
// the document; the register map, the assignment of sequencer bits, the single
// clock with a tic enable and the fixed-point formats are this design's. The
// DAC code is registered (one clock after the shaper).
module pac_top
  import pac_pkg::*;
(
  input  logic              clk,          // 4.875 MHz
  input  logic              rst_n,
  // DSP control interface
  input  logic              sclk,
  input  logic              ctl,
  input  logic              cdata,
  output logic              rdata_out,
  // ADC (feedback path)
  input  logic [ADC_W-1:0]  adc_sample,
  // DAC (forward path)
  output logic [MAG_W-1:0]  dac_code,
  output logic              dac_power,    // PAC Enable: DAC powered on
  output logic              dac_clamp,    // 1: DAC output switch clamped to 0 V
  // ramp profile for an external analog controller
  output logic [MAG_W-1:0]  ramp_mag,
  // sequencer control outputs (RF subsystem timing)
  output logic [15:0]       ifs_ctrl,
  // GPIO pads
  input  logic [9:0]        gpio_in,
  output logic [9:0]        gpio_out,
  output logic [9:0]        gpio_oe,
  // status
  output logic              tx_en,
  output pac_status_t       status
);
  pac_cfg_t cfg;

  logic              bus_req, bus_we, last_a;
  logic [7:0]        bus_addr;
  logic [15:0]       bus_wdata, bus_rdata;
  logic              ifs_we, ramp_we;
  logic [15:0]       ifs_rdata, ramp_rdata;
  logic              tic;
  logic [4:0]        ifs_state;
  logic              pac_en, ramp_en, cal_en;
  logic              ramp_active;
  logic [4:0]        ramp_idx;
  logic [LOOP_W-1:0] lpf_y, integ;
  logic              integ_at_limit, integ_at_zero;
  logic [DG_W-1:0]   dg_y;
  logic [MAG_W-1:0]  shaper_y;
  logic [1:0]        shaper_seg;
  logic signed [FB_W-1:0] fb_in;
  logic signed [FB_W:0]   fb;
  logic [9:0]        gpio_val;
  logic              secondary;

  dsp_ctrl_if u_cif (
    .clk, .rst_n, .sclk, .ctl, .cdata, .rdata_out,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .last_a
  );

  pac_regfile u_regs (
    .clk, .rst_n,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .ifs_we, .ramp_we, .ifs_rdata, .ramp_rdata,
    .adc_sample, .adc_capture(cal_en && pac_en), .integ, .dac_code,
    .cfg
  );

  tic_gen u_tic (.clk, .rst_n, .en(cfg.ifs_run), .tic);

  ifs u_ifs (
    .clk, .rst_n, .run(cfg.ifs_run), .tic,
    .we(ifs_we), .addr(bus_addr[5:0]), .wdata(bus_wdata), .rdata(ifs_rdata),
    .ctrl(ifs_ctrl), .state(ifs_state)
  );

  assign pac_en  = ifs_ctrl[IFS_PAC_EN];
  assign ramp_en = ifs_ctrl[IFS_RAMP_EN];
  assign cal_en  = ifs_ctrl[IFS_CAL_EN];

  ramp_store u_ramp (
    .clk, .rst_n, .tic, .pac_en, .ramp_en,
    .latch_idx(cfg.ramp_latch), .last_idx(cfg.ramp_last),
    .we(ramp_we), .addr(bus_addr[4:0]), .wdata(bus_wdata), .rdata(ramp_rdata),
    .mag(ramp_mag), .active(ramp_active), .idx(ramp_idx)
  );

  lpf_integrator u_lpf (
    .clk, .rst_n, .clear(!pac_en), .lpf_mode(ramp_en),
    .coef_cfg(cfg.lpf_cfg), .x(ramp_mag), .y(lpf_y)
  );

  // Feedback source: ADC sample (unipolar or two's complement) or, in digital
  // loop back, the DAC gain output brought to Q.4.
  always_comb begin
    if (cfg.loopback)
      fb_in = FB_W'(dg_y >> (DG_FB - LOOP_FB));
    else if (cfg.adc_bipolar)
      fb_in = FB_W'($signed(adc_sample)) <<< LOOP_FB;
    else
      fb_in = FB_W'({1'b0, adc_sample}) <<< LOOP_FB;
  end

  adc_gain u_adcg (.cfg(cfg.adc_gain_cfg), .x(fb_in), .y(fb));

  integrator_limiter u_int (
    .clk, .rst_n, .clear(!pac_en), .ref_in(lpf_y), .fb, .limit(cfg.limit),
    .acc(integ), .at_limit(integ_at_limit), .at_zero(integ_at_zero)
  );

  dac_gain u_dacg (.cfg(cfg.dac_gain_cfg), .x(integ), .y(dg_y));

  power_shaper u_shp (
    .gain_cfg(cfg.shaper_cfg), .thr1(cfg.thr1), .thr2(cfg.thr2), .thr3(cfg.thr3),
    .x(dg_y), .y(shaper_y), .segment(shaper_seg)
  );

  gpio u_gpio (
    .dir(cfg.gpio_dir), .inv(cfg.gpio_inv), .test_sig(ifs_ctrl[9:0]),
    .pin_in(gpio_in), .pin_out(gpio_out), .pin_oe(gpio_oe), .in_val(gpio_val)
  );

  dac_switch_ctrl u_sw (.clk, .rst_n, .pac_en, .ramp_en, .secondary, .clamp(dac_clamp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac_code <= '0;
    else begin
      unique case (cfg.dac_src)
        DAC_SRC_RAMP: dac_code <= ramp_mag;
        DAC_SRC_GPIO: dac_code <= gpio_val;
        default:      dac_code <= shaper_y;
      endcase
    end
  end

  assign dac_power = pac_en;
  assign tx_en     = ifs_ctrl[IFS_TX_EN];

  always_comb begin
    status.ifs_state      = ifs_state;
    status.ramp_active    = ramp_active;
    status.ramp_idx       = ramp_idx;
    status.integ_at_limit = integ_at_limit;
    status.integ_at_zero  = integ_at_zero;
    status.shaper_seg     = shaper_seg;
    status.secondary      = secondary;
    status.last_a         = last_a;
  end
endmodule
