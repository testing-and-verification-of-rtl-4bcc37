// tb_dac_gain: for every setting (1/64, 3/128, 1/32, 3/64, 1/16, 3/32, 1/8,
// 3/16) checks the output against input times gain on random inputs, and the
// slope of the source's gain test: a 50-nit error (100-nit reference, 50-nit
// ADC value) accumulated every sample must rise at 50 * gain nits per sample
// at the DAC (0.781 nits per sample at 1/64 ... 9.375 at 3/16).
module tb_dac_gain;
  import pac_pkg::*;
  logic [2:0] cfg;
  logic [13:0] x;
  logic [18:0] y;
  int checks = 0, failures = 0;
  dac_gain dut (.cfg, .x, .y);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  real G [8] = '{1.0/64, 3.0/128, 1.0/32, 3.0/64, 1.0/16, 3.0/32, 1.0/8, 3.0/16};
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real y0, y1, slope;
    for (int c = 0; c < 8; c++) begin
      cfg = 3'(c);
      for (int k = 0; k < 500; k++) begin
        x = 14'($urandom_range(0, 16383));
        #1;
        check(real'(y) / 2048.0 == real'(x) / 16.0 * G[c],
              $sformatf("cfg %0d x %0d y %0d", c, x, y));
      end
      x = 14'(10 * 800); #1; y0 = real'(y) / 2048.0;
      x = 14'(20 * 800); #1; y1 = real'(y) / 2048.0;
      slope = (y1 - y0) / 10.0;
      check(slope > 50.0 * G[c] - 0.001 && slope < 50.0 * G[c] + 0.001,
            $sformatf("cfg %0d slope %f", c, slope));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
