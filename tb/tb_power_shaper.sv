// tb_power_shaper: compares the block with the piecewise transfer function
// (Eq. 7 of the source) evaluated in floating point, for random inputs,
// gains and ordered thresholds; then measures the four segment slopes for each
// gain with the source's test settings (50-nit error, DAC gain 1/64) against
// its expected slopes 0.781 / 1.5625 / 3.125 / 6.25 (g = 8) up to
// 0.781 / 3.906 / 7.813 / 15.625 (g = 20).
module tb_power_shaper;
  import pac_pkg::*;
  logic [1:0] gain_cfg;
  logic [4:0] thr1, thr2, thr3;
  logic [18:0] x;
  logic [9:0] y;
  logic [1:0] segment;
  int checks = 0, failures = 0;
  power_shaper dut (.gain_cfg, .thr1, .thr2, .thr3, .x, .y, .segment);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  real Gv [4] = '{8, 12, 16, 20};
  real S [4][4] = '{'{0.781, 1.5625, 3.125, 6.250}, '{0.781, 2.344, 4.688, 9.375},
                   '{0.781, 3.125, 6.25, 12.5},   '{0.781, 3.906, 7.813, 15.625}};
  function automatic real model(real xn, real g, real t1, real t2, real t3);
    if (xn > t3) return (xn - t3) * g + (t3 - t2) * g / 2 + (t2 - t1) * g / 4 + t1;
    if (xn > t2) return (xn - t2) * g / 2 + (t2 - t1) * g / 4 + t1;
    if (xn > t1) return (xn - t1) * g / 4 + t1;
    return xn;
  endfunction
  task automatic at(input real xn, output real r);
    x = 19'(int'(xn * 2048.0)); #1;
    r = real'(y);
  endtask
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real ym, xn, sl;
    int segs [4] = '{0, 0, 0, 0};
    int a, b, c, tmp;
    for (int k = 0; k < 5000; k++) begin
      gain_cfg = 2'($urandom_range(0, 3));
      a = $urandom_range(0, 31) >> $urandom_range(0, 3); b = $urandom_range(0, 31) >> $urandom_range(0, 3); c = $urandom_range(0, 31) >> $urandom_range(0, 3);
      if (a > b) begin tmp = a; a = b; b = tmp; end
      if (b > c) begin tmp = b; b = c; c = tmp; end
      if (a > b) begin tmp = a; a = b; b = tmp; end
      thr1 = 5'(a); thr2 = 5'(b); thr3 = 5'(c);
      x = 19'($urandom_range(0, 524287) >> $urandom_range(0, 8));
      #1;
      xn = real'(x) / 2048.0;
      ym = model(xn, Gv[gain_cfg], a * 32.0, b * 32.0, c * 32.0);
      if (ym > 1023.0) ym = 1023.0;
      check(real'(y) == $floor(ym), $sformatf("x %f g %0d t %0d %0d %0d: y %0d model %f",
            xn, gain_cfg, a, b, c, y, ym));
      segs[segment]++;
    end
    for (int s = 0; s < 4; s++) check(segs[s] > 0, $sformatf("segment %0d never used", s));
    // slope test: thresholds at 32, 64 and 96 nits
    thr1 = 5'd1; thr2 = 5'd2; thr3 = 5'd3;
    for (int g = 0; g < 4; g++) begin
      real lo [4] = '{5.0, 40.0, 70.0, 98.0};
      real hi [4] = '{25.0, 60.0, 90.0, 118.0};
      gain_cfg = 2'(g);
      for (int s = 0; s < 4; s++) begin
        real yh, yl;
        at(hi[s], yh); at(lo[s], yl);
        sl = (yh - yl) / (hi[s] - lo[s]) * 50.0 / 64.0;
        check(sl > S[g][s] - 0.05 && sl < S[g][s] + 0.05,
              $sformatf("gain %0d segment %0d slope %f expected %f", g, s, sl, S[g][s]));
      end
    end
    // saturation at DAC full scale
    gain_cfg = 2'd3; x = '1; #1;
    check(y == 10'd1023, "saturates at 1023");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
