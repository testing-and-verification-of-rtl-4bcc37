// tb_integrator_limiter: constant 100-nit error (the source's limiter test) is
// accumulated and must stop exactly at each programmed limit of its test list
// (0, 1, 2500, 5000, 7500, 8192, 10000, 12500, 15000, 16383); at unity forward
// gain the resulting DAC level must match the listed voltages
// (Limit/16383 * 2.1 V + 0.3 V). A negative error must stop at zero. A random
// error sequence is compared with a clamped-accumulator model.
module tb_integrator_limiter;
  import pac_pkg::*;
  logic clk = 0, rst_n = 0, clear = 1;
  logic [13:0] ref_in = 0, limit = 0, acc;
  logic signed [16:0] fb = 0;
  logic at_limit, at_zero;
  int checks = 0, failures = 0;
  integrator_limiter dut (.clk, .rst_n, .clear, .ref_in, .fb, .limit, .acc, .at_limit, .at_zero);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int L [10] = '{0, 1, 2500, 5000, 7500, 8192, 10000, 12500, 15000, 16383};
    real V [10] = '{0.300, 0.301, 0.6204, 0.9408, 1.26, 1.35, 1.58, 1.90, 2.22, 2.40};
    int m, n, e;
    int lo_hits = 0, hi_hits = 0;
    real v;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); clear = 1; limit = 14'(L[i]); ref_in = 14'(100 * 16); fb = 0;
      @(negedge clk); clear = 0;
      n = 0; m = 0;
      while (n < 20) begin
        @(negedge clk);
        m = m + 1600; if (m > L[i]) m = L[i];
        check(acc == 14'(m), $sformatf("limit %0d: acc %0d exp %0d", L[i], acc, m));
        if (acc == 14'(L[i])) n++;
      end
      // unity forward gain (DAC gain 1/8, shaper 8): DAC code = acc/16
      v = 0.3 + real'(acc / 16) * 2.1 / 1024.0;
      check(v > V[i] - 0.004 && v < V[i] + 0.004,
            $sformatf("limit %0d gives %f V, expected %f V", L[i], v, V[i]));
    end
    // negative error stops at zero
    @(negedge clk); limit = 14'd16383; ref_in = 0; fb = 17'sd500;
    repeat (40) @(negedge clk);
    check(acc == 0, "negative error holds zero");
    check(at_zero, "zero clamp flagged");
    // random errors against a model
    m = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < 20000; k++) begin
      ref_in = 14'($urandom_range(0, 16383));
      fb = 17'($signed($urandom_range(0, 24000)) - 8000);
      limit = (k % 500 == 0) ? 14'($urandom_range(0, 16383)) : limit;
      e = int'(ref_in) - int'(fb);
      @(negedge clk);
      m = m + e;
      if (m < 0) begin m = 0; lo_hits++; end
      else if (m > int'(limit)) begin m = int'(limit); hi_hits++; end
      check(acc == 14'(m), $sformatf("random: acc %0d exp %0d", acc, m));
    end
    check(lo_hits > 0 && hi_hits > 0, "both clamps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
