// tb_ramp_store: plays the source's seven-entry example profile (magnitudes
// 5, 10, 15, 20, 15, 10, 5 nits for 5, 5, 10, 30, 10, 5, 5 tics, written as the
// example's register words 0x0144 ... 0x0144) and checks magnitude and duration
// tic by tic with irregular tics. Then plays the typical burst profile
// [364,26] [380,7] [370,1]* [72,9] [114,10] [228,9] [576,10] with entry 3
// latched: the latched level must hold while Ramp Enable is high and the
// ramp-down entries must follow its fall. Also checks the minimum (1 tic) and
// maximum (64 tic) durations and that PAC Enable low clears the output.
module tb_ramp_store;
  import pac_pkg::*;
  logic clk = 0, rst_n = 0, tic = 0, pac_en = 0, ramp_en = 0, we = 0;
  logic [4:0] latch_idx = 31, last_idx = 6, addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [9:0] mag;
  logic active;
  logic [4:0] idx;
  int checks = 0, failures = 0;
  ramp_store dut (.clk, .rst_n, .tic, .pac_en, .ramp_en, .latch_idx, .last_idx,
                  .we, .addr, .wdata, .rdata, .mag, .active, .idx);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(input int a, input logic [15:0] d);
    @(negedge clk); we = 1; addr = 5'(a); wdata = d;
    @(negedge clk); we = 0;
  endtask
  // Play a profile of n entries; ramp_en falls after `fall_after` cycles.
  task automatic play(input int n, input int M[], input int D[], input int latch,
                      input int fall_after, input bit random_tic);
    int s, t, c;
    bit done;
    @(negedge clk); ramp_en = 1;
    @(negedge clk);
    s = 0; t = 0; c = 0; done = 0;
    while (!done && c < 20000) begin
      check(mag == 10'(M[s]), $sformatf("entry %0d tic %0d: mag %0d exp %0d", s, t, mag, M[s]));
      check(active, "active while playing");
      tic = random_tic ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      if (tic) begin
        if (t >= D[s] - 1 && !(s == latch && ramp_en)) begin
          t = 0; s++;
          if (s == n) done = 1;
        end else if (t < D[s] - 1) t++;
      end
      @(negedge clk);
      c++;
      if (c == fall_after) ramp_en = 0;
    end
    tic = 0;
    check(mag == 0 && !active, "output returns to zero after the last entry");
    ramp_en = 0;
  endtask
  initial begin
    int M1[] = '{5, 10, 15, 20, 15, 10, 5};
    int D1[] = '{5, 5, 10, 30, 10, 5, 5};
    logic [15:0] W1[] = '{16'h0144, 16'h0284, 16'h03C9, 16'h051D, 16'h03C9, 16'h0284, 16'h0144};
    int M2[] = '{364, 380, 370, 72, 114, 228, 576};
    int D2[] = '{26, 7, 1, 9, 10, 9, 10};
    int M3[] = '{512, 256, 400};
    int D3[] = '{1, 64, 35};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 7; i++) wr(i, W1[i]);
    @(negedge clk); addr = 3; #1; check(rdata == 16'h051D, "RAM read back");
    pac_en = 1;
    play(7, M1, D1, 31, 1000000, 1);
    // typical burst profile with the third entry latched
    for (int i = 0; i < 7; i++) wr(i, 16'({10'(M2[i]), 6'(D2[i] - 1)}));
    latch_idx = 2;
    play(7, M2, D2, 2, 400, 0);
    // count how long the latched level lasted
    // (checked inside play: entry 2 held until ramp_en fell at cycle 400)
    // durations at the limits of the 6-bit field
    for (int i = 0; i < 3; i++) wr(i, 16'({10'(M3[i]), 6'(D3[i] - 1)}));
    latch_idx = 31; last_idx = 2;
    play(3, M3, D3, 31, 1000000, 1);
    // PAC Enable low stops playback
    @(negedge clk); ramp_en = 1; tic = 1;
    repeat (3) @(negedge clk);
    check(mag == 10'd256 && active, "playing before PAC Enable falls");
    pac_en = 0;
    @(negedge clk);
    check(mag == 0 && !active, "PAC Enable low clears the ramp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
