// tb_dsp_ctrl_if: a DSP bus-functional model performs single and indexed
// writes and reads over the serial interface; a 256-word memory model sits on
// the parallel bus. Checks the written words and addresses, the read data
// returned on Request Data, the A flag, and that a frame with neither R nor W
// changes nothing.
module tb_dsp_ctrl_if;
  logic clk = 0, rst_n = 0;
  logic bus_req, bus_we, last_a;
  logic [7:0] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic [15:0] mem [256];
  int checks = 0, failures = 0, writes = 0;
  always #5 clk = ~clk;
  cif_bfm bfm (.clk);
  dsp_ctrl_if dut (.clk, .rst_n, .sclk(bfm.sclk), .ctl(bfm.ctl), .cdata(bfm.cdata),
                   .rdata_out(bfm.rdata), .bus_req, .bus_we, .bus_addr, .bus_wdata,
                   .bus_rdata, .last_a);
  assign bus_rdata = mem[bus_addr];
  always @(posedge clk) if (bus_req && bus_we) begin mem[bus_addr] <= bus_wdata; writes++; end
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] v, q[], w[];
    logic [15:0] ref_mem [256];
    int a;
    for (int i = 0; i < 256; i++) begin mem[i] = 16'(i * 3 + 7); ref_mem[i] = mem[i]; end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    // single writes
    for (int k = 0; k < 20; k++) begin
      a = $urandom_range(0, 255); v = 16'($urandom);
      bfm.write1(8'(a), v); ref_mem[a] = v;
      check(mem[a] == v, $sformatf("single write %h -> %h got %h", a, v, mem[a]));
    end
    // indexed write of 5 words with the A flag
    w = new[5];
    foreach (w[k]) w[k] = 16'($urandom);
    a = 8'h40;
    bfm.write_words(8'(a), w, 1'b1);
    foreach (w[k]) begin
      ref_mem[a + k] = w[k];
      check(mem[a + k] == w[k], $sformatf("indexed write word %0d", k));
    end
    check(last_a == 1'b1, "A flag reported");
    // single reads
    for (int k = 0; k < 20; k++) begin
      a = $urandom_range(0, 255);
      bfm.read1(8'(a), v);
      check(v == ref_mem[a], $sformatf("read %h got %h exp %h", a, v, ref_mem[a]));
    end
    // indexed read of 6 words
    bfm.read_words(8'h3E, 6, q);
    foreach (q[k]) check(q[k] == ref_mem[8'h3E + k], $sformatf("indexed read word %0d", k));
    // frame with neither R nor W
    a = writes;
    bfm.header(8'h10, 1'b0, 1'b0, 1'b0, 1'b0);
    bfm.finish_frame();
    check(writes == a, "no access without R or W");
    for (int i = 0; i < 256; i++) check(mem[i] == ref_mem[i], "memory intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
