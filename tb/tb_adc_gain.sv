// tb_adc_gain: for every setting (3/4, 7/8, 1, 1 1/8, 1 1/4, 1 1/2, 1 3/4, 2)
// checks floor(x * gain) on random signed inputs, and the expected slopes of
// the source's ADC gain test (150-nit reference, 50-nit ADC value, DAC gain
// 1/16: slope = (150 - gain * 50) / 16 = 7.031 ... 3.125 nits per sample).
module tb_adc_gain;
  import pac_pkg::*;
  logic [2:0] cfg;
  logic signed [15:0] x;
  logic signed [16:0] y;
  int checks = 0, failures = 0;
  adc_gain dut (.cfg, .x, .y);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  real G [8] = '{0.75, 0.875, 1.0, 1.125, 1.25, 1.5, 1.75, 2.0};
  real S [8] = '{7.031, 6.641, 6.250, 5.859, 5.469, 4.688, 3.906, 3.125};
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real slope;
    for (int c = 0; c < 8; c++) begin
      cfg = 3'(c);
      for (int k = 0; k < 500; k++) begin
        x = 16'($signed($urandom_range(0, 16000)) - 8000);
        #1;
        check(real'(y) == $floor(real'(x) * G[c]), $sformatf("cfg %0d x %0d y %0d", c, x, y));
      end
      x = 16'(50 * 16); #1;   // ADC value 0x32 = 50 nits
      slope = (150.0 - real'(y) / 16.0) / 16.0;
      check(slope > S[c] - 0.001 && slope < S[c] + 0.001, $sformatf("cfg %0d slope %f", c, slope));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
