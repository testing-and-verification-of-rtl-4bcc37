// tb_dac_switch_ctrl: drives PAC Enable / Ramp Enable through bursts like the
// source's switch timing diagram (several Ramp Enable pulses per PAC Enable
// window) and random sequences, and checks the clamp against a reference:
// clamped whenever PAC Enable is low, and within a PAC Enable window clamped
// until the first Ramp Enable rise, open from that cycle on.
module tb_dac_switch_ctrl;
  logic clk = 0, rst_n = 0, pac_en = 0, ramp_en = 0, secondary, clamp;
  int checks = 0, failures = 0;
  dac_switch_ctrl dut (.clk, .rst_n, .pac_en, .ramp_en, .secondary, .clamp);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit seen, prev_ramp;
    int opened = 0, held = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    seen = 0; prev_ramp = 0;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      // slow random waveforms: PAC Enable long windows, Ramp Enable pulses
      if ($urandom_range(0, 60) == 0) pac_en = !pac_en;
      if ($urandom_range(0, 8) == 0)  ramp_en = !ramp_en;
      #1;
      if (!pac_en) seen = 0;
      else if (ramp_en && !prev_ramp) seen = 1;
      check(clamp == !(pac_en && seen),
            $sformatf("cycle %0d pac %b ramp %b clamp %b", k, pac_en, ramp_en, clamp));
      if (pac_en && !seen) held++;
      if (pac_en && seen) opened++;
      prev_ramp = ramp_en;
    end
    check(held > 0 && opened > 0, "both clamp states inside PAC Enable exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
