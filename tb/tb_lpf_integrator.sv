// tb_lpf_integrator: compares the block with a floating-point model of
//   y[n] = y[n-1] + A (x[n-1] - y[n-1])   (low-pass, Ramp Enable high)
//   y[n] = y[n-1] - A x[n-1]              (integrator, Ramp Enable low)
// for all four coefficients A = 0.0781, 0.0625, 0.0547, 0.0469, using the
// source's 250-nit step and impulse stimuli, then a switch to integration that
// must fall linearly and stop at zero. Also checks the 63% rise time against
// the time constants of the coefficient table (2.67, 3.07, 3.69, 4.31 us at
// 4.875 MHz) and that clear empties the state.
module tb_lpf_integrator;
  import pac_pkg::*;
  logic clk = 0, rst_n = 0, clear = 1, lpf_mode = 1;
  logic [1:0] coef_cfg = 0;
  logic [9:0] x = 0;
  logic [13:0] y;
  int checks = 0, failures = 0;
  lpf_integrator dut (.clk, .rst_n, .clear, .lpf_mode, .coef_cfg, .x, .y);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  real A [4] = '{0.078125, 0.0625, 0.0546875, 0.046875};
  real T [4] = '{2.67, 3.07, 3.69, 4.31};
  real ym;
  // one sample: model and DUT advance together, then compare (Q10.4 output)
  task automatic step_cmp(input int cfg, input string what);
    real diff;
    @(posedge clk);
    if (!clear) begin
      if (lpf_mode) ym = ym + A[cfg] * (real'(x) - ym);
      else begin ym = ym - A[cfg] * real'(x); if (ym < 0) ym = 0; end
    end else ym = 0;
    @(negedge clk);
    diff = real'(y) / 16.0 - ym;
    check(diff < 0.07 && diff > -0.07,
          $sformatf("%s cfg %0d: y %f model %f", what, cfg, real'(y) / 16.0, ym));
  endtask
  initial begin
    int n63;
    real tc;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int cfg = 0; cfg < 4; cfg++) begin
      coef_cfg = 2'(cfg);
      // step response
      @(negedge clk); clear = 1; lpf_mode = 1; x = 0; ym = 0;
      @(negedge clk); clear = 0; x = 250;
      n63 = -1;
      for (int n = 1; n <= 200; n++) begin
        step_cmp(cfg, "step");
        if (n63 < 0 && real'(y) / 16.0 >= 250.0 * 0.632) n63 = n;
      end
      tc = real'(n63) / 4.875;
      check(tc > T[cfg] - 0.4 && tc < T[cfg] + 0.4,
            $sformatf("cfg %0d rise time %f us, table %f us", cfg, tc, T[cfg]));
      check(y >= 14'(249 * 16), "step settles to the input");
      // Ramp Enable falls: integrate 20 nits per sample downwards to zero
      lpf_mode = 0; x = 20;
      for (int n = 0; n < 400; n++) step_cmp(cfg, "integrate");
      check(y == 0, "integrator stops at zero");
      // impulse response
      lpf_mode = 1; x = 250;
      step_cmp(cfg, "impulse");
      x = 0;
      for (int n = 0; n < 60; n++) step_cmp(cfg, "impulse");
    end
    // clear
    x = 500; lpf_mode = 1;
    repeat (20) @(negedge clk);
    clear = 1; @(negedge clk); @(negedge clk);
    check(y == 0, "clear empties the filter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
