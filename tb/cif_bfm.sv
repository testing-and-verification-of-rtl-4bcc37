// cif_bfm: bus-functional model of the DSP side of the serial control
// interface, for testbenches. A transfer raises Control, sends the 16-bit
// header (X X, address, R W A I, X X) and, for writes, 16 data bits per word,
// most significant bit first, changing Control Data while the serial clock is
// low. All lines change on falling edges of the system clock. Read data is sampled on the falling edge of the serial clock. One serial
// clock period is 2*HALF system clocks.
interface cif_bfm #(parameter int HALF = 4) (input logic clk);
  logic sclk = 1'b0;
  logic ctl = 1'b0;
  logic cdata = 1'b0;
  logic rdata;

  task automatic half_wait();
    repeat (HALF) @(negedge clk);
  endtask

  // one serial bit: set data while low, rising edge, falling edge; returns the
  // Request Data level seen at the falling edge
  task automatic bit_cycle(input logic d, output logic r);
    cdata = d;
    half_wait();
    sclk = 1'b1;
    half_wait();
    sclk = 1'b0;
    r = rdata;
  endtask

  task automatic header(input logic [7:0] addr, input bit rd, input bit wr,
                        input bit a, input bit idx);
    logic [15:0] h;
    logic r;
    h = {2'b00, addr, rd, wr, a, idx, 2'b00};
    ctl = 1'b1;
    for (int i = 15; i >= 0; i--) bit_cycle(h[i], r);
  endtask

  task automatic finish_frame();
    half_wait();
    ctl = 1'b0;
    cdata = 1'b0;
    repeat (2 * HALF) @(negedge clk);
  endtask

  // write n consecutive words (index flag set when n > 1)
  task automatic write_words(input logic [7:0] addr, input logic [15:0] d[], input bit a = 0);
    logic r;
    header(addr, 1'b0, 1'b1, a, d.size() > 1);
    foreach (d[k]) for (int i = 15; i >= 0; i--) bit_cycle(d[k][i], r);
    finish_frame();
  endtask

  task automatic write1(input logic [7:0] addr, input logic [15:0] d);
    logic [15:0] w[] = '{d};
    write_words(addr, w);
  endtask

  // read n consecutive words
  task automatic read_words(input logic [7:0] addr, input int n, output logic [15:0] q[]);
    logic r;
    q = new[n];
    header(addr, 1'b1, 1'b0, 1'b1, n > 1);
    for (int k = 0; k < n; k++)
      for (int i = 15; i >= 0; i--) begin
        bit_cycle(1'b0, r);
        q[k][i] = r;
      end
    finish_frame();
  endtask

  task automatic read1(input logic [7:0] addr, output logic [15:0] v);
    logic [15:0] q[];
    read_words(addr, 1, q);
    v = q[0];
  endtask
endinterface
