// gpio: the 10 general purpose test lines of the device.
//
// Each line is separately an input or an output and can be inverted, as the
// document describes. As an output it carries one internal test signal (here
// the low ten control outputs of the intra-frame sequencer, so the sequence can
// be checked on a scope); as an input its value, after the optional inversion,
// is offered to the DAC for the DAC test. Which internal signals are routed is
// this design's choice. Pad drivers are outside: the block produces the output
// value and an output enable per line. Combinational.
module gpio #(
  parameter int unsigned N = 10
) (
  input  logic [N-1:0] dir,       // 1 = output
  input  logic [N-1:0] inv,       // 1 = inverted
  input  logic [N-1:0] test_sig,  // internal signals routed out
  input  logic [N-1:0] pin_in,    // pad input value
  output logic [N-1:0] pin_out,   // pad output value
  output logic [N-1:0] pin_oe,    // pad output enable
  output logic [N-1:0] in_val     // pad inputs after inversion; outputs read as 0
);
  assign pin_out = test_sig ^ inv;
  assign pin_oe  = dir;
  assign in_val  = (pin_in ^ inv) & ~dir;
endmodule
