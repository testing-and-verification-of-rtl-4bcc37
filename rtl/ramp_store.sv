// ramp_store: the transmit power ramp profile, the reference input of the loop.
//
// A RAM of 32 x 16-bit words, one word per profile entry: bits [15:6] are the
// magnitude in nits (0..1023, where 1023 is DAC full scale) and bits [5:0] the
// duration, the entry lasting duration+1 tics. This word layout and the
// duration formula are the document's.
//
// Playback (the sequencing rules are partly this design's own): a rising edge
// of Ramp Enable starts the profile at entry 0. At each tic the current entry
// ends once it has lasted duration+1 tics, and the next entry is output. Entry
// `latch_idx` is the "latched" entry: it is held for as long as Ramp Enable
// stays high, so the burst plateau lasts as long as the sequencer keeps Ramp
// Enable high. Once Ramp Enable falls, the latched entry ends at the next tic
// and the remaining entries play, which the loop filter then integrates into
// the falling edge. After entry `last_idx` the output returns to 0. A low PAC
// Enable stops playback and clears the output.
//
// `mag` is registered: it changes on the clock edge on which an entry starts.
// The RAM has a synchronous write and combinational read port for the register
// file.
module ramp_store
  import pac_pkg::*;
#(
  parameter int unsigned WORDS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tic,
  input  logic             pac_en,
  input  logic             ramp_en,
  input  logic [4:0]       latch_idx,
  input  logic [4:0]       last_idx,
  // RAM port
  input  logic             we,
  input  logic [4:0]       addr,
  input  logic [15:0]      wdata,
  output logic [15:0]      rdata,
  // profile output
  output logic [MAG_W-1:0] mag,
  output logic             active,
  output logic [4:0]       idx
);
  logic [15:0] mem [WORDS];
  logic [5:0]  cnt;
  logic        ramp_q;
  logic [15:0] cur;
  logic        holding;

  assign rdata   = mem[addr];
  assign cur     = mem[idx];
  assign holding = (idx == latch_idx) && ramp_en;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ramp_q <= 1'b0;
      active <= 1'b0;
      idx    <= '0;
      cnt    <= '0;
      mag    <= '0;
    end else if (!pac_en) begin
      ramp_q <= ramp_en;
      active <= 1'b0;
      idx    <= '0;
      cnt    <= '0;
      mag    <= '0;
    end else begin
      ramp_q <= ramp_en;
      if (ramp_en && !ramp_q) begin
        active <= 1'b1;
        idx    <= '0;
        cnt    <= '0;
        mag    <= mem[0][15:6];
      end else if (active && tic) begin
        if (cnt >= cur[5:0] && !holding) begin
          cnt <= '0;
          if (idx == last_idx) begin
            active <= 1'b0;
            mag    <= '0;
          end else begin
            idx <= idx + 5'd1;
            mag <= mem[idx + 5'd1][15:6];
          end
        end else if (cnt < cur[5:0]) begin
          cnt <= cnt + 6'd1;
        end
      end
    end
  end
endmodule
