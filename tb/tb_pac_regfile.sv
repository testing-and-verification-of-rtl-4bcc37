// tb_pac_regfile: checks the reset configuration (A = 1/16, DAC gain 1/16,
// ADC gain 1, shaper gain 8, limit 12800, thresholds at maximum, latched ramp
// entry 3 of 7), write/read of every control register and its decoding into
// the configuration fields, the RAM write strobes for the sequencer
// (0x00-0x3F) and ramp (0x40-0x5F) stores and their read mux, that monitor
// registers ignore writes, and that the ADC monitor captures only while
// capture is requested.
module tb_pac_regfile;
  import pac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bus_req = 0, bus_we = 0;
  logic [7:0] bus_addr = 0;
  logic [15:0] bus_wdata = 0, bus_rdata;
  logic ifs_we, ramp_we;
  logic [15:0] ifs_rdata = 16'hA5A5, ramp_rdata = 16'h5A5A;
  logic [7:0] adc_sample = 0;
  logic adc_capture = 0;
  logic [13:0] integ = 14'd1234;
  logic [9:0] dac_code = 10'd777;
  pac_cfg_t cfg;
  int checks = 0, failures = 0;
  pac_regfile dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); bus_req = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_req = 0; bus_we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk); bus_addr = a; #1; d = bus_rdata;
  endtask
  initial begin
    logic [15:0] v, d;
    int nifs = 0, nramp = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(cfg.ifs_run == 0 && cfg.dac_src == DAC_SRC_LOOP && !cfg.loopback, "reset mode");
    check(cfg.lpf_cfg == 1 && cfg.dac_gain_cfg == 4 && cfg.adc_gain_cfg == 2 && cfg.shaper_cfg == 0,
          "reset gains");
    check(cfg.limit == 14'd12800, "reset limit");
    check(cfg.thr1 == 31 && cfg.thr2 == 31 && cfg.thr3 == 31, "reset thresholds");
    check(cfg.ramp_latch == 2 && cfg.ramp_last == 6, "reset ramp control");
    for (int k = 0; k < 200; k++) begin
      d = 16'($urandom);
      wr(A_PAC_CTRL, d);
      rd(A_PAC_CTRL, v); check(v == {1'b0, d[14:0]}, "PAC_CTRL read back");
      check(cfg.ifs_run == d[0] && cfg.dac_src == dac_src_e'(d[2:1]) && cfg.loopback == d[3]
            && cfg.adc_bipolar == d[4] && cfg.lpf_cfg == d[6:5] && cfg.dac_gain_cfg == d[9:7]
            && cfg.adc_gain_cfg == d[12:10] && cfg.shaper_cfg == d[14:13], "PAC_CTRL decode");
      d = 16'($urandom);
      wr(A_LIMIT, d); rd(A_LIMIT, v);
      check(v == {2'b0, d[13:0]} && cfg.limit == d[13:0], "LIMIT");
      d = 16'($urandom);
      wr(A_SHAPER, d); rd(A_SHAPER, v);
      check(v == {1'b0, d[14:0]} && cfg.thr1 == d[4:0] && cfg.thr2 == d[9:5] && cfg.thr3 == d[14:10], "SHAPER");
      d = 16'($urandom);
      wr(A_RAMP_CTRL, d); rd(A_RAMP_CTRL, v);
      check(v == {6'b0, d[9:0]} && cfg.ramp_latch == d[4:0] && cfg.ramp_last == d[9:5], "RAMP_CTRL");
      d = 16'($urandom);
      wr(A_GPIO_DIR, d); wr(A_GPIO_INV, ~d);
      check(cfg.gpio_dir == d[9:0] && cfg.gpio_inv == ~d[9:0], "GPIO registers");
    end
    // RAM strobes and read mux
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); bus_req = 1; bus_we = 1; bus_addr = 8'(a); #1;
      check(ifs_we == (a < 64), $sformatf("ifs_we at %h", a));
      check(ramp_we == (a >= 64 && a < 96), $sformatf("ramp_we at %h", a));
      if (ifs_we) nifs++;
      if (ramp_we) nramp++;
      if (a < 64) check(bus_rdata == 16'hA5A5, "IFS read mux");
      else if (a < 96) check(bus_rdata == 16'h5A5A, "ramp read mux");
    end
    bus_req = 0; bus_we = 0;
    check(nifs == 64 && nramp == 32, "store sizes 64 and 32 words");
    // monitors
    rd(A_MON_INTEG, v); check(v == 16'd1234, "integrator monitor");
    rd(A_MON_DAC, v);   check(v == 16'd777, "DAC monitor");
    wr(A_MON_DAC, 16'h1111); rd(A_MON_DAC, v); check(v == 16'd777, "monitor is read only");
    @(negedge clk); adc_sample = 8'h43; adc_capture = 0;
    @(negedge clk); rd(A_MON_ADC, v); check(v == 16'h0000, "no capture without Calibration Enable");
    @(negedge clk); adc_capture = 1;
    @(negedge clk); adc_capture = 0; adc_sample = 8'h86;
    rd(A_MON_ADC, v); check(v == 16'h0043, "ADC sample captured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
