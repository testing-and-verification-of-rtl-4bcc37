// tb_tic_gen: checks that the tic enable averages 4 tics per 9 clocks
// (2.1667 MHz out of 4.875 MHz), that every 9 consecutive clocks hold exactly
// 4 tics, that tics are 2 or 3 clocks apart, and that
// no tic is issued while the generator is disabled.
module tb_tic_gen;
  logic clk = 0, rst_n = 0, en = 0, tic;
  int checks = 0, failures = 0;
  tic_gen dut (.clk, .rst_n, .en, .tic);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n, last, gap;
    logic [8:0] hist;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: no tics
    n = 0;
    repeat (50) begin @(negedge clk); if (tic) n++; end
    check(n == 0, "tic while disabled");
    @(negedge clk) en = 1;
    n = 0; last = -1; hist = '0;
    for (int c = 0; c < 9000; c++) begin
      @(negedge clk);
      hist = {hist[7:0], tic};
      if (c >= 8) check($countones(hist) == 4, $sformatf("%0d tics in 9 clocks", $countones(hist)));
      if (tic) begin
        if (last >= 0) begin
          gap = c - last;
          check(gap == 2 || gap == 3, $sformatf("tic gap %0d", gap));
        end
        last = c; n++;
      end
    end
    check(n == 4000, $sformatf("expected 4000 tics in 9000 clocks, got %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
