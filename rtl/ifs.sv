// ifs: intra-frame sequencer, the programmable state machine that times a
// transmit burst.
//
// The sequencer owns a RAM of 64 x 16-bit words holding 32 states. State s
// uses word 2s as its "assertions word" (the level of the 16 control outputs
// while in the state) and word 2s+1 as its "duration word". A state lasts
// duration[14:0]+1 tics; when it ends the sequencer moves to state s+1, or back
// to state 0 if duration bit 15 (the reset bit) is set. After state 31 it also
// wraps to state 0. This layout, the duration formula and the reset bit follow
// the document (its example: word 0x09 = 0x8014 ends a five-state sequence).
//
// Running the sequence only while `run` is set, holding the outputs at zero
// when stopped, and restarting at state 0 when `run` rises are this design's
// choices. The outputs change on the clock edge that starts a state, so
// `ctrl` is registered and follows the state counter with no extra delay.
//
// Write/read port: a plain synchronous-write, combinational-read port on the
// RAM, used by the register file. Interface timing: `tic` is a one-cycle enable
// at the sequencer rate.
module ifs #(
  parameter int unsigned WORDS = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        tic,
  // RAM port
  input  logic        we,
  input  logic [5:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  // sequencer outputs
  output logic [15:0] ctrl,
  output logic [4:0]  state
);
  logic [15:0] mem [WORDS];
  logic [14:0] cnt;          // tics spent in the current state
  logic        running;

  logic [15:0] dur_word;
  assign dur_word = mem[{state, 1'b1}];
  assign rdata    = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      cnt     <= '0;
      running <= 1'b0;
      ctrl    <= '0;
    end else if (!run) begin
      state   <= '0;
      cnt     <= '0;
      running <= 1'b0;
      ctrl    <= '0;
    end else if (!running) begin
      // first cycle of a run: enter state 0
      running <= 1'b1;
      state   <= '0;
      cnt     <= '0;
      ctrl    <= mem[0];
    end else if (tic) begin
      if (cnt == dur_word[14:0]) begin
        logic [4:0] nxt;
        nxt   = dur_word[15] ? 5'd0 : state + 5'd1;
        state <= nxt;
        cnt   <= '0;
        ctrl  <= mem[{nxt, 1'b0}];
      end else begin
        cnt <= cnt + 15'd1;
      end
    end
  end
endmodule
