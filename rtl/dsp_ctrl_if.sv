// dsp_ctrl_if: the serial control interface through which the DSP reads and
// writes device registers.
//
// Four lines: a serial clock, Control (high for the whole transfer), Control
// Data (DSP to device) and Request Data (device to DSP). A transfer starts with
// a 16-bit header: two don't-care bits, the 8-bit register address, then the
// R, W, A and I flags and two don't-care bits. For a write, 16 data bits follow
// on Control Data; for a read, the device returns 16 data bits on Request Data
// right after the header. This frame layout is the document's (Fig. 5). With
// the index flag I set and Control kept high, each further 16-bit word goes to
// (or comes from) the next address, as the document describes for consecutive
// locations. Bits are sent most significant first (this design's choice). The
// A flag (address read back) asks the micro controller level for a response
// message; the device needs to do nothing for it and only reports it on
// `last_a`.
//
// Timing: the serial lines are taken into the system clock domain through
// two-flop synchronisers and sampled on serial clock rising edges, so the
// serial clock must be at most an eighth of the system clock. Control Data is
// sampled on the rising edge. Read data bit 15 is driven after the first
// serial clock rising edge that follows the header, and each later rising
// edge moves to the next bit, so the DSP samples Request Data on falling
// edges. Register accesses
// are single-cycle pulses on the parallel bus (bus_rdata is combinational),
// which an assertion checks.
module dsp_ctrl_if (
  input  logic        clk,
  input  logic        rst_n,
  // serial side
  input  logic        sclk,
  input  logic        ctl,
  input  logic        cdata,
  output logic        rdata_out,
  // parallel register bus
  output logic        bus_req,
  output logic        bus_we,
  output logic [7:0]  bus_addr,
  output logic [15:0] bus_wdata,
  input  logic [15:0] bus_rdata,
  output logic        last_a
);
  typedef enum logic [2:0] {S_HDR, S_WDATA, S_RLOAD, S_RDATA, S_DONE} state_e;

  logic [2:0]  sclk_s, ctl_s, cdat_s;
  logic        srise, sfr, sd;
  state_e      st;
  logic [3:0]  bitn;
  logic [15:0] shreg;
  logic [15:0] rsh;
  logic        f_i;
  logic        adv;      // advance the address after an indexed write

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      ctl_s  <= '0;
      cdat_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      ctl_s  <= {ctl_s[1:0], ctl};
      cdat_s <= {cdat_s[1:0], cdata};
    end
  end
  assign srise = sclk_s[1] && !sclk_s[2];
  assign sfr   = ctl_s[1];
  assign sd    = cdat_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_HDR;
      bitn      <= '0;
      shreg     <= '0;
      rsh       <= '0;
      f_i       <= 1'b0;
      adv       <= 1'b0;
      bus_req   <= 1'b0;
      bus_we    <= 1'b0;
      bus_addr  <= '0;
      bus_wdata <= '0;
      last_a    <= 1'b0;
      rdata_out <= 1'b0;
    end else begin
      bus_req <= 1'b0;
      bus_we  <= 1'b0;
      adv     <= 1'b0;
      if (adv) bus_addr <= bus_addr + 8'd1;
      if (!sfr) begin
        st        <= S_HDR;
        bitn      <= '0;
        rdata_out <= 1'b0;
      end else if (st == S_RLOAD) begin
        // one system clock after the address is set: fetch the word; its
        // first bit goes out on the next serial clock rising edge
        bus_req <= 1'b1;
        rsh     <= bus_rdata;
        st      <= S_RDATA;
      end else if (srise) begin
        bitn <= bitn + 4'd1;
        unique case (st)
          S_HDR: begin
            shreg <= {shreg[14:0], sd};
            if (bitn == 4'd15) begin
              // header: X X A7..A0 R W A I X X
              bus_addr <= shreg[12:5];
              last_a   <= shreg[2];
              f_i      <= shreg[1];
              if (shreg[3])      st <= S_WDATA;
              else if (shreg[4]) st <= S_RLOAD;
              else               st <= S_DONE;
            end
          end
          S_WDATA: begin
            shreg <= {shreg[14:0], sd};
            if (bitn == 4'd15) begin
              bus_req   <= 1'b1;
              bus_we    <= 1'b1;
              bus_wdata <= {shreg[14:0], sd};
              adv       <= f_i;
              if (!f_i) st <= S_DONE;
            end
          end
          S_RDATA: begin
            rdata_out <= rsh[15];
            rsh       <= {rsh[14:0], 1'b0};
            if (bitn == 4'd15) begin
              if (f_i) begin
                bus_addr <= bus_addr + 8'd1;
                st       <= S_RLOAD;
              end else begin
                st       <= S_DONE;
              end
            end
          end
          default: ;   // S_DONE: ignore bits until Control falls
        endcase
      end
    end
  end
  // Each register access is a single-cycle strobe.
  a_req_pulse: assert property (@(posedge clk) bus_req |=> !bus_req);
endmodule
