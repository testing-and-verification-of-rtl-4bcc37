// tb_pac_top: end-to-end test of the power amplifier controller at its
// default parameters, with a DSP bus-functional model on the serial control
// interface and a behavioural model of the analog loop (DAC, clamp switch,
// PA, detector, ADC).
//
// The sequencer is programmed with the typical burst timing (25, 50, 34,
// 1184, 38 and 25 tics: Tx Enable, then PAC Enable, then Ramp Enable for the
// ramp-up and the plateau with Calibration Enable, then the ramp-down) plus an
// idle state with the reset bit. Bursts run:
//   1  typical settings and ramp profile [364,26] [380,7] [370,1]* [72,9]
//      [114,10] [228,9] [576,10]: the 8-bit feedback cannot reach the
//      reference, so the integrator must sit at its limit (12800) and the DAC
//      at 12800 / 16 * 1/16 = 50 nits
//   2  closed-loop tracking with the profile halved (plateau 185 nits) and
//      gains chosen for the model: ADC reading must settle on 185, the ramp
//      down must take the integrator to zero, the shaper must leave unity gain
//   3  digital loop back: the DAC code must settle on the plateau (185)
//   4  ADC forced to 0xBC, unipolar (188 > 185): integrator pinned at zero
//   5  ADC forced to 0xBC, bipolar (-68): integrator pinned at the limit
//   6  ramp store routed straight to the DAC, levels 0, 128, 256, 512, 768,
//      512, 256, 128, 0, 1023 of 10 tics each: each level must appear on the
//      DAC for 22 or 23 clocks (10 tics of 2.25 clocks)
// then two series of short bursts:
//   DAC test  sequence 25 / 25 / 100 / 25 tics, GPIO inputs routed to the DAC,
//             one line high per burst: signal lengths, 0 V while PAC Enable is
//             low, and the DAC voltages 302 mV ... 1.35 V of one line each
//   ADC test  DC voltages injected at the ADC, unipolar 0, 0.5, 1, 1.5, 1.9 V
//             and bipolar -0.95, -0.5, 0, 0.5, 0.95 V, captured under
//             Calibration Enable and read back over the serial interface:
//             0x00 0x43 0x86 0xC9 0xFF and 0x80 0xBC 0x00 0x43 0x7F
//   limiter   reference 100 nits, ADC at 0, forward gain 1/8 x 8 = 1: for
//             limits 0 ... 16383 the DAC must settle at 0.3 V + L/16383 x 2.1 V
// Every mechanism is counted and must occur.
module tb_pac_top;
  import pac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] adc_sample;
  logic [9:0] dac_code, ramp_mag;
  logic dac_power, dac_clamp, tx_en;
  logic [15:0] ifs_ctrl;
  logic [9:0] gpio_in = 0, gpio_out, gpio_oe;
  pac_status_t status;
  logic force_en = 0;
  logic inject_en = 0, adc_bip = 0;
  real inject_v = 0.0;
  logic [7:0] force_code = 0;
  real v_ctl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cif_bfm bfm (.clk);

  pac_top dut (
    .clk, .rst_n, .sclk(bfm.sclk), .ctl(bfm.ctl), .cdata(bfm.cdata), .rdata_out(bfm.rdata),
    .adc_sample, .dac_code, .dac_power, .dac_clamp, .ramp_mag, .ifs_ctrl,
    .gpio_in, .gpio_out, .gpio_oe, .tx_en, .status
  );

  pa_loop_model model (.clk, .dac_code, .dac_power, .dac_clamp, .force_en, .force_code,
                       .inject_en, .inject_v, .bipolar(adc_bip), .adc_sample, .v_ctl);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- mechanism counters ----------------------------------------------
  int n_clamp_hold, n_clamp_open, n_latch_hold, n_lpf, n_rampdown, n_limit, n_zero;
  int n_seg [4];
  int n_wrap, n_cal, n_loopback, n_bipolar, n_ramp_ext, n_gpio_dac, n_gpio_out;
  int n_idx_wr, n_idx_rd, n_adc, n_limit_test;
  int latch_idx = 2;
  logic [7:0] last_cal;
  logic [4:0] prev_state;
  logic pac_q;

  always @(negedge clk) if (rst_n) begin
    // clamp rules of the output switch
    if (!dac_power) check(dac_clamp, "clamped while PAC Enable is low");
    if (dac_power && ifs_ctrl[IFS_RAMP_EN]) check(!dac_clamp, "open while Ramp Enable is high");
    if (dac_power && dac_clamp) n_clamp_hold++;
    if (dac_power && !dac_clamp) n_clamp_open++;
    if (status.ramp_active && status.ramp_idx == 5'(latch_idx) && ifs_ctrl[IFS_RAMP_EN]) n_latch_hold++;
    if (dac_power && ifs_ctrl[IFS_RAMP_EN]) n_lpf++;
    if (dac_power && status.ramp_active && !ifs_ctrl[IFS_RAMP_EN]) n_rampdown++;
    if (dac_power && status.integ_at_limit) n_limit++;
    if (dac_power && status.integ_at_zero) n_zero++;
    if (dac_power) n_seg[status.shaper_seg]++;
    if (prev_state != 0 && status.ifs_state == 0) n_wrap++;
    prev_state = status.ifs_state;
    check(tx_en == ifs_ctrl[IFS_TX_EN], "Tx Enable output");
    if (gpio_oe == 10'h3FF) begin
      check(gpio_out == (ifs_ctrl[9:0] ^ 10'h005), "GPIO routes sequencer outputs");
      n_gpio_out++;
    end
  end
  always @(posedge clk) if (ifs_ctrl[IFS_CAL_EN] && ifs_ctrl[IFS_PAC_EN]) last_cal <= adc_sample;

  // ---- register helpers ----------------------------------------------------
  function automatic logic [15:0] ctrl_word(bit run, int src, bit lb, bit bip, int lpf,
                                            int dacg, int adcg, int shp);
    return 16'(run) | 16'(src << 1) | 16'(lb << 3) | 16'(bip << 4) | 16'(lpf << 5)
         | 16'(dacg << 7) | 16'(adcg << 10) | 16'(shp << 13);
  endfunction

  task automatic load_ramp(input int M[], input int D[]);
    logic [15:0] w[];
    logic [15:0] q[];
    w = new[M.size()];
    foreach (M[i]) w[i] = {10'(M[i]), 6'(D[i] - 1)};
    bfm.write_words(A_RAMP_BASE, w);
    n_idx_wr++;
    bfm.read_words(A_RAMP_BASE, M.size(), q);
    n_idx_rd++;
    foreach (w[i]) check(q[i] == w[i], $sformatf("ramp word %0d read back", i));
  endtask

  // ---- one burst -----------------------------------------------------------
  // kind: 1 limit, 2 tracking, 3 loop back, 4 forced unipolar, 5 forced bipolar,
  //       6 ramp store to DAC
  task automatic run_burst(input int kind, input logic [15:0] ctrl);
    int pac_cycles, cal_cycles, guard, hold, lvl_changes, cyc;
    bit dac_ok, bad_hold;
    logic [9:0] prev_dac, prev_ramp;
    bfm.write1(A_PAC_CTRL, ctrl);
    guard = 0;
    while (!dac_power && guard < 2000) begin @(negedge clk); guard++; end
    check(dac_power, "PAC Enable came");
    pac_cycles = 0; cal_cycles = 0; hold = 0; lvl_changes = 0; bad_hold = 0;
    prev_dac = dac_code; prev_ramp = ramp_mag;
    while (dac_power) begin
      pac_cycles++;
      if (ifs_ctrl[IFS_CAL_EN]) cal_cycles++;
      if (ifs_ctrl[IFS_CAL_EN] && cal_cycles > 1000) begin
        case (kind)
          1: begin
               check(dac_code == 10'd50, $sformatf("limited loop: DAC %0d", dac_code));
               check(status.integ_at_limit, "integrator at its limit");
             end
          2: begin
               check(adc_sample >= 8'd181 && adc_sample <= 8'd189,
                     $sformatf("tracking: ADC %0d for plateau 185", adc_sample));
               check(v_ctl > 0.9 && v_ctl < 2.2, "PA control voltage in range");
               check(status.shaper_seg != 2'd0, "shaper above its first threshold");
             end
          3: begin
               check(dac_code >= 10'd184 && dac_code <= 10'd186,
                     $sformatf("loop back: DAC %0d for plateau 185", dac_code));
               n_loopback++;
             end
          4: check(status.integ_at_zero, "unipolar 0xBC above the reference: integrator at zero");
          5: begin
               check(status.integ_at_limit, "bipolar 0xBC is negative: integrator at limit");
               n_bipolar++;
             end
          default: ;
        endcase
      end
      if (kind == 6) begin
        // DAC follows the ramp store one clock later
        check(dac_code == prev_ramp, "ramp store routed to the DAC");
        if (dac_code != prev_dac) begin
          if (lvl_changes > 0 && lvl_changes < 10 && !(hold == 22 || hold == 23)) bad_hold = 1;
          lvl_changes++;
          hold = 0;
        end
        hold++;
        n_ramp_ext++;
      end
      prev_dac = dac_code; prev_ramp = ramp_mag;
      @(negedge clk);
    end
    // PAC Enable lasted 50 + 34 + 1184 + 38 tics = 1306 tics = 2938.5 clocks
    check(pac_cycles >= 2936 && pac_cycles <= 2941,
          $sformatf("PAC Enable lasted %0d clocks, expected 2938.5", pac_cycles));
    check(cal_cycles >= 2662 && cal_cycles <= 2666,
          $sformatf("Calibration Enable (1184 tics) lasted %0d clocks", cal_cycles));
    if (kind == 6) begin
      check(!bad_hold, "each ramp level held 10 tics");
      check(lvl_changes >= 9, $sformatf("ramp levels seen %0d", lvl_changes));
    end
    if (kind == 2) begin
      logic [15:0] v;
      bfm.read1(A_MON_ADC, v);
      check(v == 16'(last_cal), $sformatf("calibration capture %h expected %h", v, last_cal));
      n_cal++;
    end
    // stop the sequencer in its idle state
    while (ifs_ctrl != 0) @(negedge clk);
    bfm.write1(A_PAC_CTRL, ctrl & 16'hFFFE);
    repeat (10) @(negedge clk);
    check(status.ifs_state == 0 && ifs_ctrl == 0, "sequencer stopped");
  endtask

  // One burst of a short sequence: starts the sequencer, measures how long Tx
  // Enable, PAC Enable and Ramp Enable are high, takes the PA control voltage
  // in the middle of Ramp Enable, checks that it is 0 V while PAC Enable is
  // low, then stops the sequencer in its idle state.
  task automatic short_burst(input logic [15:0] ctrl, output int tx_c, output int pac_c,
                             output int ramp_c, output real v_mid);
    int guard;
    // the sequencer starts while the write frame is still closing
    fork
      bfm.write1(A_PAC_CTRL, ctrl);
    join_none
    guard = 0;
    while (!tx_en && guard < 2000) begin @(negedge clk); guard++; end
    check(tx_en, "Tx Enable came");
    tx_c = 0; pac_c = 0; ramp_c = 0; v_mid = 0.0;
    while (tx_en) begin
      tx_c++;
      if (dac_power) pac_c++;
      if (ifs_ctrl[IFS_RAMP_EN]) begin
        ramp_c++;
        if (ramp_c == 200) v_mid = v_ctl;
      end
      if (!dac_power) check(v_ctl == 0.0, "DAC output 0 V while PAC Enable is low");
      @(negedge clk);
    end
    bfm.write1(A_PAC_CTRL, ctrl & 16'hFFFE);
    repeat (10) @(negedge clk);
    check(status.ifs_state == 0 && ifs_ctrl == 0, "sequencer stopped");
  endtask

  initial begin
    int M1[] = '{364, 380, 370, 72, 114, 228, 576};
    int D1[] = '{26, 7, 1, 9, 10, 9, 10};
    int M2[] = '{182, 190, 185, 36, 57, 114, 288};
    int M6[] = '{0, 128, 256, 512, 768, 512, 256, 128, 0, 1023};
    int D6[] = '{10, 10, 10, 10, 10, 10, 10, 10, 10, 10};
    int IFS_DUR[] = '{25, 50, 34, 1184, 38, 25, 400};
    logic [15:0] IFS_CTL[] = '{16'h0001, 16'h0003, 16'h0007, 16'h000F, 16'h0003, 16'h0001, 16'h0000};
    real T9 [10] = '{0.302, 0.3041, 0.3082, 0.3164, 0.3328, 0.3656, 0.4313, 0.5625, 0.825, 1.35};
    logic [15:0] w[];
    logic [15:0] v;
    logic [15:0] typ, trk;
    real vd;
    int tx_c, pac_c, ramp_c;
    // ADC test voltages, unipolar then bipolar, and the expected readings
    // limiter test values and the DAC voltages expected for them
    int LIM [10] = '{0, 1, 2500, 5000, 7500, 8192, 10000, 12500, 15000, 16383};
    real T18 [10] = '{0.300, 0.301, 0.6204, 0.9408, 1.26, 1.35, 1.58, 1.90, 2.22, 2.40};
    real AV [10] = '{0.0, 0.5, 1.0, 1.5, 1.9, -0.95, -0.5, 0.0, 0.5, 0.95};
    logic [7:0] AX [10] = '{8'h00, 8'h43, 8'h86, 8'hC9, 8'hFF, 8'h80, 8'hBC, 8'h00, 8'h43, 8'h7F};

    for (int i = 0; i < 4; i++) n_seg[i] = 0;
    {n_clamp_hold, n_clamp_open, n_latch_hold, n_lpf, n_rampdown, n_limit, n_zero} = '0;
    {n_wrap, n_cal, n_loopback, n_bipolar, n_ramp_ext, n_gpio_dac, n_gpio_out, n_idx_wr, n_idx_rd, n_adc, n_limit_test} = '0;
    prev_state = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // sequencer program: one indexed write of all 14 words
    w = new[14];
    foreach (IFS_DUR[s]) begin
      w[2*s]     = IFS_CTL[s];
      w[2*s + 1] = 16'(IFS_DUR[s] - 1) | (s == 6 ? 16'h8000 : 16'h0000);
    end
    bfm.write_words(A_IFS_BASE, w);
    n_idx_wr++;
    bfm.read1(8'h09, v);
    check(v == 16'd38 - 16'd1, "sequencer word read back");
    // reset configuration matches the typical settings
    typ = ctrl_word(1, 0, 0, 0, 1, 4, 2, 0);
    bfm.read1(A_PAC_CTRL, v);
    check(v == (typ & 16'hFFFE), $sformatf("reset PAC_CTRL %h", v));
    bfm.read1(A_LIMIT, v);
    check(v == 16'd12800, "reset limit 12800");

    // 1: typical settings, limit reached
    load_ramp(M1, D1);
    run_burst(1, typ);

    // 2: tracking, gains chosen for the analog model; GPIO routes outputs
    load_ramp(M2, D1);
    bfm.write1(A_LIMIT, 16'd16383);
    bfm.write1(A_SHAPER, 16'h7FE1);           // t1 = 32 nits, t2 = t3 = 992
    bfm.write1(A_GPIO_INV, 16'h0005);
    bfm.write1(A_GPIO_DIR, 16'h03FF);
    trk = ctrl_word(1, 0, 0, 0, 1, 7, 2, 3);  // DAC gain 3/16, ADC gain 1, g = 20
    run_burst(2, trk);
    bfm.write1(A_GPIO_DIR, 16'h0000);

    // 3: digital loop back, shaper at unity
    bfm.write1(A_SHAPER, 16'h7FFF);
    run_burst(3, ctrl_word(1, 0, 1, 0, 1, 7, 2, 3));

    // 4 and 5: forced ADC value 0xBC, unipolar then bipolar
    bfm.write1(A_SHAPER, 16'h7FE1);
    force_en = 1; force_code = 8'hBC;
    run_burst(4, trk);
    run_burst(5, trk | 16'h0010);
    force_en = 0;

    // 6: ramp store straight to the DAC
    latch_idx = 31;
    bfm.write1(A_RAMP_CTRL, 16'((9 << 5) | 31));
    load_ramp(M6, D6);
    run_burst(6, ctrl_word(1, 1, 0, 0, 1, 4, 2, 0));

    // DAC test: the short sequence 25 / 25 / 100 / 25 tics (Tx; Tx + PAC;
    // Tx + PAC + Ramp; Tx + PAC) then 200 idle tics, with the GPIO inputs routed
    // to the DAC and one line high per burst
    w = '{16'h0001, 16'd24, 16'h0003, 16'd24, 16'h0007, 16'd99, 16'h0003, 16'd24,
          16'h0000, 16'h8000 | 16'd199};
    bfm.write_words(A_IFS_BASE, w);
    bfm.write1(A_GPIO_INV, 16'h0000);
    for (int k = 0; k < 10; k++) begin
      gpio_in = 10'(1 << k);
      short_burst(ctrl_word(1, 2, 0, 0, 1, 4, 2, 0), tx_c, pac_c, ramp_c, vd);
      check(tx_c >= 392 && tx_c <= 396, $sformatf("Tx Enable 175 tics: %0d clocks", tx_c));
      check(pac_c >= 336 && pac_c <= 339, $sformatf("PAC Enable 150 tics: %0d clocks", pac_c));
      check(ramp_c >= 224 && ramp_c <= 226, $sformatf("Ramp Enable 100 tics: %0d clocks", ramp_c));
      check(dac_code == 10'(1 << k), $sformatf("GPIO line %0d to DAC: %0d", k + 1, dac_code));
      check(vd > T9[k] - 0.002 && vd < T9[k] + 0.002,
            $sformatf("line %0d: DAC %f V, table %f V", k + 1, vd, T9[k]));
      n_gpio_dac++;
    end
    bfm.write1(A_PAC_CTRL, ctrl_word(0, 2, 0, 0, 1, 4, 2, 0));
    bfm.write1(A_GPIO_INV, 16'h0001);
    gpio_in = 10'h000;
    repeat (3) @(negedge clk);
    check(dac_code == 10'h001, "GPIO input inversion");

    // ADC test: DC voltages at the ADC input, captured while Calibration Enable
    // is high and read back from the monitor register. Sequence 5 / 10 / 20 / 5
    // tics (Tx; Tx + PAC; Tx + PAC + Cal; Tx + PAC) then 200 idle tics.
    w = '{16'h0001, 16'd4, 16'h0003, 16'd9, 16'h000B, 16'd19, 16'h0003, 16'd4,
          16'h0000, 16'h8000 | 16'd199};
    bfm.write_words(A_IFS_BASE, w);
    inject_en = 1;
    for (int k = 0; k < 10; k++) begin
      adc_bip = (k >= 5);
      inject_v = AV[k];
      short_burst(ctrl_word(1, 0, 0, adc_bip, 1, 4, 2, 0), tx_c, pac_c, ramp_c, vd);
      bfm.read1(A_MON_ADC, v);
      check(v == 16'(AX[k]), $sformatf("ADC %s %f V: read %h, expected %h",
                                         adc_bip ? "bipolar" : "unipolar", AV[k], v, AX[k]));
      n_adc++;
    end
    inject_en = 0;

    // Limiter test: reference 100 nits, ADC held at 0, DAC gain 1/8 and power
    // shaper g = 8 with all thresholds at 0 (total forward gain one); the
    // integrator runs into the limit and the DAC must read 0.3 V + L/16383 * 2.1 V.
    // Sequence 5 / 5 / 400 / 5 tics (Tx; Tx + PAC; Tx + PAC + Ramp; Tx + PAC).
    w = '{16'h0001, 16'd4, 16'h0003, 16'd4, 16'h0007, 16'd399, 16'h0003, 16'd4,
          16'h0000, 16'h8000 | 16'd199};
    bfm.write_words(A_IFS_BASE, w);
    bfm.write1(A_RAMP_CTRL, 16'h0000);              // one entry, latched
    bfm.write1(A_RAMP_BASE, {10'd100, 6'd63});
    bfm.write1(A_SHAPER, 16'h0000);
    latch_idx = 0;
    force_en = 1; force_code = 8'h00;
    for (int k = 0; k < 10; k++) begin
      bfm.write1(A_LIMIT, 16'(LIM[k]));
      short_burst(ctrl_word(1, 0, 0, 0, 1, 6, 2, 0), tx_c, pac_c, ramp_c, vd);
      check(vd > T18[k] - 0.004 && vd < T18[k] + 0.004,
            $sformatf("limit %0d: DAC %f V, expected %f V", LIM[k], vd, T18[k]));
      n_limit_test++;
    end
    force_en = 0;

    // every mechanism must have happened
    check(n_clamp_hold > 0, "clamp held between PAC Enable and Ramp Enable");
    check(n_clamp_open > 0, "clamp opened");
    check(n_latch_hold > 0, "latched ramp entry held");
    check(n_lpf > 0, "ramp filter in low-pass mode");
    check(n_rampdown > 0, "ramp filter integrating the ramp-down");
    check(n_limit > 0, "integrator limit");
    check(n_zero > 0, "integrator zero clamp");
    check(n_seg[0] > 0 && n_seg[1] > 0 && n_seg[3] > 0, "shaper segments used");
    check(n_wrap > 0, "sequencer reset bit");
    check(n_cal > 0, "calibration capture");
    check(n_loopback > 0, "digital loop back");
    check(n_bipolar > 0, "bipolar ADC");
    check(n_ramp_ext > 0, "ramp store to DAC");
    check(n_gpio_dac > 0, "GPIO to DAC");
    check(n_gpio_out > 0, "GPIO outputs");
    check(n_idx_wr > 0 && n_idx_rd > 0, "indexed serial transfers");
    check(n_adc > 0, "ADC calibration readings");
    check(n_limit_test > 0, "limiter test");
    $display("mechanisms: clamp_hold=%0d clamp_open=%0d latch_hold=%0d lpf=%0d rampdown=%0d limit=%0d zero=%0d seg=%0d/%0d/%0d/%0d wrap=%0d cal=%0d loopback=%0d bipolar=%0d ramp_ext=%0d gpio_dac=%0d gpio_out=%0d idx_wr=%0d idx_rd=%0d adc=%0d",
             n_clamp_hold, n_clamp_open, n_latch_hold, n_lpf, n_rampdown, n_limit, n_zero,
             n_seg[0], n_seg[1], n_seg[2], n_seg[3], n_wrap, n_cal, n_loopback, n_bipolar,
             n_ramp_ext, n_gpio_dac, n_gpio_out, n_idx_wr, n_idx_rd, n_adc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
