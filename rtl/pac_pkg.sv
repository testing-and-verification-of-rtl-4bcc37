// pac_pkg: types, register map and coefficient tables shared by the digital
// power amplifier controller (PAC).
//
// Number formats used along the loop (all unsigned unless noted):
//   ramp magnitude  10 bits, whole "nits" (1 nit = one DAC step, about 2 mV)
//   loop word       14 bits, nits with 4 fraction bits (Q10.4). This is the
//                   width of the integrator and of its limit. A limit of 16383
//                   drives the DAC to full scale at a forward gain of one, so
//                   the DAC sees the loop word divided by 16.
//   feedback        signed, Q.4 nits (ADC gain output)
//   DAC gain output Q10.11 nits (the 14-bit loop word times k/128 kept exact)
//   DAC code        10 bits, whole nits
// The gain and coefficient tables are those of the document; the bit layout of
// the control registers and the register addresses above 0x5F are this
// design's own choice (the document only fixes IFS at 0x00 and the ramp store
// at 0x40).
package pac_pkg;

  // ---- widths ----------------------------------------------------------
  localparam int unsigned MAG_W   = 10;   // ramp magnitude, DAC code
  localparam int unsigned LOOP_W  = 14;   // integrator / limit width
  localparam int unsigned LOOP_FB = 4;    // fraction bits of the loop word
  localparam int unsigned ADC_W   = 8;    // ADC sample
  localparam int unsigned DG_FB   = LOOP_FB + 7;   // fraction bits after DAC gain
  localparam int unsigned DG_W    = LOOP_W + 5;    // DAC gain output width
  localparam int unsigned FB_W    = 16;            // signed feedback width (Q.4)

  // ---- IFS control signal positions (assertion word bits) --------------
  localparam int unsigned IFS_TX_EN   = 0;
  localparam int unsigned IFS_PAC_EN  = 1;
  localparam int unsigned IFS_RAMP_EN = 2;
  localparam int unsigned IFS_CAL_EN  = 3;

  // ---- register map ------------------------------------------------------
  localparam logic [7:0] A_IFS_BASE   = 8'h00;  // 0x00..0x3F, 64 words
  localparam logic [7:0] A_RAMP_BASE  = 8'h40;  // 0x40..0x5F, 32 words
  localparam logic [7:0] A_PAC_CTRL   = 8'h60;
  localparam logic [7:0] A_LIMIT      = 8'h61;
  localparam logic [7:0] A_SHAPER     = 8'h62;
  localparam logic [7:0] A_RAMP_CTRL  = 8'h63;
  localparam logic [7:0] A_GPIO_DIR   = 8'h64;
  localparam logic [7:0] A_GPIO_INV   = 8'h65;
  localparam logic [7:0] A_MON_ADC    = 8'h70;  // read only
  localparam logic [7:0] A_MON_INTEG  = 8'h71;  // read only
  localparam logic [7:0] A_MON_DAC    = 8'h72;  // read only

  // Source of the DAC code.
  typedef enum logic [1:0] {
    DAC_SRC_LOOP = 2'd0,   // internal closed loop (normal operation)
    DAC_SRC_RAMP = 2'd1,   // ramp store straight to the DAC ("external" ramp mode)
    DAC_SRC_GPIO = 2'd2    // 10 GPIO inputs straight to the DAC (DAC test)
  } dac_src_e;

  // Decoded configuration held in the control store.
  typedef struct packed {
    logic                 ifs_run;      // sequencer running
    dac_src_e             dac_src;
    logic                 loopback;     // DAC gain output fed back instead of ADC
    logic                 adc_bipolar;  // ADC sample is two's complement
    logic [1:0]           lpf_cfg;      // Table 5 configuration 1..4 -> 0..3
    logic [2:0]           dac_gain_cfg; // Table 6 configuration 1..8 -> 0..7
    logic [2:0]           adc_gain_cfg; // Table 8 configuration 1..8 -> 0..7
    logic [1:0]           shaper_cfg;   // Table 7 gain configuration 1..4 -> 0..3
    logic [LOOP_W-1:0]    limit;        // integrator limiter
    logic [4:0]           thr1, thr2, thr3; // thresholds in units of 32 nits
    logic [4:0]           ramp_latch;   // ramp entry held until Ramp Enable falls
    logic [4:0]           ramp_last;    // last ramp entry played
    logic [9:0]           gpio_dir;     // 1 = output
    logic [9:0]           gpio_inv;     // 1 = inverted
  } pac_cfg_t;

  // Observable loop state, brought out of the top for test and monitoring.
  typedef struct packed {
    logic [4:0] ifs_state;     // current sequencer state
    logic       ramp_active;   // ramp profile playing
    logic [4:0] ramp_idx;      // current ramp entry
    logic       integ_at_limit;// integrator clamped at the limit
    logic       integ_at_zero; // integrator clamped at zero
    logic [1:0] shaper_seg;    // power shaper segment in use
    logic       secondary;     // secondary clamp control signal
    logic       last_a;        // A flag of the last control transfer
  } pac_status_t;

  // LPF/integrator coefficient A = k/128 (Table 5: 0.0781, 0.0625, 0.0547, 0.0469).
  function automatic logic [4:0] lpf_coef_k(input logic [1:0] cfg);
    case (cfg)
      2'd0:    return 5'd10;
      2'd1:    return 5'd8;
      2'd2:    return 5'd7;
      default: return 5'd6;
    endcase
  endfunction

  // DAC gain A = k/128 (Table 6: 1/64, 3/128, 1/32, 3/64, 1/16, 3/32, 1/8, 3/16).
  function automatic logic [4:0] dac_gain_k(input logic [2:0] cfg);
    case (cfg)
      3'd0:    return 5'd2;
      3'd1:    return 5'd3;
      3'd2:    return 5'd4;
      3'd3:    return 5'd6;
      3'd4:    return 5'd8;
      3'd5:    return 5'd12;
      3'd6:    return 5'd16;
      default: return 5'd24;
    endcase
  endfunction

  // ADC gain A = k/8 (Table 8: 3/4, 7/8, 1, 1 1/8, 1 1/4, 1 1/2, 1 3/4, 2).
  function automatic logic [4:0] adc_gain_k(input logic [2:0] cfg);
    case (cfg)
      3'd0:    return 5'd6;
      3'd1:    return 5'd7;
      3'd2:    return 5'd8;
      3'd3:    return 5'd9;
      3'd4:    return 5'd10;
      3'd5:    return 5'd12;
      3'd6:    return 5'd14;
      default: return 5'd16;
    endcase
  endfunction

  // Power shaper gain g (Table 7 / Table 14: 8, 12, 16, 20).
  function automatic logic [4:0] shaper_gain(input logic [1:0] cfg);
    case (cfg)
      2'd0:    return 5'd8;
      2'd1:    return 5'd12;
      2'd2:    return 5'd16;
      default: return 5'd20;
    endcase
  endfunction

endpackage
