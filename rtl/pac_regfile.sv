// pac_regfile: the device register space seen by the DSP control interface.
//
// 256 word addresses, as the 8-bit address field allows:
//   0x00-0x3F  intra-frame sequencer store (RAM inside ifs)
//   0x40-0x5F  ramp store (RAM inside ramp_store)
//   0x60       PAC_CTRL  [0] sequencer run, [2:1] DAC source (0 loop,
//              1 ramp store, 2 GPIO), [3] digital loop back, [4] ADC bipolar,
//              [6:5] LPF coefficient, [9:7] DAC gain, [12:10] ADC gain,
//              [14:13] power shaper gain (each the table configuration minus 1)
//   0x61       LIMIT     [13:0] integrator limit
//   0x62       SHAPER    [4:0] t1, [9:5] t2, [14:10] t3, in units of 32 nits
//   0x63       RAMP_CTRL [4:0] latched entry, [9:5] last entry
//   0x64/0x65  GPIO direction / inversion, [9:0]
//   0x70       MON_ADC   last ADC sample taken while Calibration Enable and
//              PAC Enable were high (read only)
//   0x71       MON_INTEG integrator output (read only)
//   0x72       MON_DAC   DAC code (read only)
// The store groups, the IFS and ramp base addresses and the calibration
// capture of the ADC sample are the document's; the control and monitor
// addresses and bit layouts are this design's. Reset values are the typical
// loop settings of the document where it gives them (A = 1/16, DAC gain 1/16,
// ADC gain 1, power shaper g = 8, limit 12800) with all thresholds at their
// maximum, so the shaper starts at unity gain.
//
// Bus timing: a write takes effect on the clock edge where bus_req and
// bus_we are high; bus_rdata is combinational from bus_addr.
module pac_regfile
  import pac_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic              bus_req,
  input  logic              bus_we,
  input  logic [7:0]        bus_addr,
  input  logic [15:0]       bus_wdata,
  output logic [15:0]       bus_rdata,
  // RAM ports
  output logic              ifs_we,
  output logic              ramp_we,
  input  logic [15:0]       ifs_rdata,
  input  logic [15:0]       ramp_rdata,
  // monitor inputs
  input  logic [ADC_W-1:0]  adc_sample,
  input  logic              adc_capture,
  input  logic [LOOP_W-1:0] integ,
  input  logic [MAG_W-1:0]  dac_code,
  // configuration
  output pac_cfg_t          cfg
);
  logic [15:0]      r_ctrl, r_limit, r_shaper, r_ramp, r_gdir, r_ginv;
  logic [ADC_W-1:0] mon_adc;
  logic             wr;

  assign wr      = bus_req && bus_we;
  assign ifs_we  = wr && (bus_addr[7:6] == 2'b00);
  assign ramp_we = wr && (bus_addr[7:5] == 3'b010);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_ctrl   <= {1'b0, 2'd0, 3'd2, 3'd4, 2'd1, 1'b0, 1'b0, 2'd0, 1'b0};
      r_limit  <= 16'd12800;
      r_shaper <= {1'b0, 5'd31, 5'd31, 5'd31};
      r_ramp   <= {6'd0, 5'd6, 5'd2};
      r_gdir   <= '0;
      r_ginv   <= '0;
      mon_adc  <= '0;
    end else begin
      if (wr) begin
        case (bus_addr)
          A_PAC_CTRL:  r_ctrl   <= bus_wdata;
          A_LIMIT:     r_limit  <= bus_wdata;
          A_SHAPER:    r_shaper <= bus_wdata;
          A_RAMP_CTRL: r_ramp   <= bus_wdata;
          A_GPIO_DIR:  r_gdir   <= bus_wdata;
          A_GPIO_INV:  r_ginv   <= bus_wdata;
          default: ;
        endcase
      end
      if (adc_capture) mon_adc <= adc_sample;
    end
  end

  always_comb begin
    if (bus_addr[7:6] == 2'b00)       bus_rdata = ifs_rdata;
    else if (bus_addr[7:5] == 3'b010) bus_rdata = ramp_rdata;
    else begin
      case (bus_addr)
        A_PAC_CTRL:  bus_rdata = {1'b0, r_ctrl[14:0]};
        A_LIMIT:     bus_rdata = {2'b0, r_limit[13:0]};
        A_SHAPER:    bus_rdata = {1'b0, r_shaper[14:0]};
        A_RAMP_CTRL: bus_rdata = {6'b0, r_ramp[9:0]};
        A_GPIO_DIR:  bus_rdata = {6'b0, r_gdir[9:0]};
        A_GPIO_INV:  bus_rdata = {6'b0, r_ginv[9:0]};
        A_MON_ADC:   bus_rdata = 16'(mon_adc);
        A_MON_INTEG: bus_rdata = 16'(integ);
        A_MON_DAC:   bus_rdata = 16'(dac_code);
        default:     bus_rdata = '0;
      endcase
    end
  end

  always_comb begin
    cfg.ifs_run      = r_ctrl[0];
    cfg.dac_src      = dac_src_e'(r_ctrl[2:1]);
    cfg.loopback     = r_ctrl[3];
    cfg.adc_bipolar  = r_ctrl[4];
    cfg.lpf_cfg      = r_ctrl[6:5];
    cfg.dac_gain_cfg = r_ctrl[9:7];
    cfg.adc_gain_cfg = r_ctrl[12:10];
    cfg.shaper_cfg   = r_ctrl[14:13];
    cfg.limit        = r_limit[13:0];
    cfg.thr1         = r_shaper[4:0];
    cfg.thr2         = r_shaper[9:5];
    cfg.thr3         = r_shaper[14:10];
    cfg.ramp_latch   = r_ramp[4:0];
    cfg.ramp_last    = r_ramp[9:5];
    cfg.gpio_dir     = r_gdir[9:0];
    cfg.gpio_inv     = r_ginv[9:0];
  end
endmodule
