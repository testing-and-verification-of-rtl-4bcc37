// tb_ifs: programs the five-state example sequence (states of 25, 10, 15, 5
// and 20 tics; controls 1-4 as listed in the source's example table) and
// checks the control outputs tic by tic over several repetitions, with tics
// arriving at irregular intervals. Also checks that the last state's reset bit
// restarts the sequence, that a stopped sequencer outputs zero, and the RAM
// read port.
module tb_ifs;
  logic clk = 0, rst_n = 0, run = 0, tic = 0, we = 0;
  logic [5:0] addr = 0;
  logic [15:0] wdata = 0, rdata, ctrl;
  logic [4:0] state;
  int checks = 0, failures = 0;
  ifs dut (.clk, .rst_n, .run, .tic, .we, .addr, .wdata, .rdata, .ctrl, .state);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // Table of the example: control levels per state (controls 1..4) and durations.
  int dur [5] = '{25, 10, 15, 5, 20};
  bit [3:0] lv [5] = '{4'b0111, 4'b0011, 4'b0111, 4'b0101, 4'b1101};
  task automatic wr(input int a, input logic [15:0] d);
    @(negedge clk); we = 1; addr = 6'(a); wdata = d;
    @(negedge clk); we = 0;
  endtask
  initial begin
    int s, t;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      wr(2*i, 16'(lv[i]));
      wr(2*i+1, 16'(dur[i] - 1) | (i == 4 ? 16'h8000 : 16'h0));
    end
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); addr = 6'(2*i+1); #1;
      check(rdata == (16'(dur[i] - 1) | (i == 4 ? 16'h8000 : 16'h0)), "RAM read back");
    end
    @(negedge clk); check(ctrl == 0, "outputs zero while stopped");
    run = 1;
    @(negedge clk);   // first cycle of the run loads state 0
    s = 0; t = 0;
    for (int c = 0; c < 3 * 2 * 75 + 10; c++) begin
      check(ctrl[3:0] == lv[s] && ctrl[15:4] == 0,
            $sformatf("state %0d tic %0d ctrl %h", s, t, ctrl));
      check(state == 5'(s), "state number");
      tic = ($urandom_range(0, 1) == 1);
      @(negedge clk);
      if (tic) begin
        t++;
        if (t == dur[s]) begin t = 0; s = (s + 1) % 5; end
      end
    end
    tic = 0;
    run = 0; @(negedge clk);
    check(ctrl == 0 && state == 0, "stop clears outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
