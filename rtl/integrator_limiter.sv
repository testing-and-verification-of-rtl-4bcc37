// integrator_limiter: the loop integrator, H(z) = 1/(1 - z^-1), with its
// output held between 0 and a programmable 14-bit limit.
//
// Each clock the error (filtered reference minus scaled feedback) is added to
// the accumulator. A sum below zero is replaced by zero and a sum above `limit`
// by `limit`; limiting the top lets the controller stop winding up when the
// power amplifier saturates. The transfer function, the two clamps and the
// 14-bit limit are the document's. The accumulator is a register, so the
// output at sample n includes the error up to sample n-1 (a delay-free
// integrator cannot close a loop in logic); it is cleared while PAC Enable is
// low. The accumulator and the limit share the Q10.4 loop format, so a limit of
// 16383 lets the DAC reach full scale at a forward gain of one.
module integrator_limiter
  import pac_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [LOOP_W-1:0]       ref_in,   // reference, Q10.4
  input  logic signed [FB_W:0]    fb,       // feedback, signed Q.4
  input  logic [LOOP_W-1:0]       limit,
  output logic [LOOP_W-1:0]       acc,
  output logic                    at_limit, // output clamped high this cycle
  output logic                    at_zero   // output clamped low this cycle
);
  localparam int unsigned SW = FB_W + 4;
  logic signed [SW-1:0] err, sum;

  assign err = SW'($signed({1'b0, ref_in})) - SW'(fb);
  assign sum = SW'($signed({1'b0, acc})) + err;
  assign at_limit = sum > SW'($signed({1'b0, limit}));
  assign at_zero  = sum < 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (clear)    acc <= '0;
    else if (at_zero)  acc <= '0;
    else if (at_limit) acc <= limit;
    else               acc <= sum[LOOP_W-1:0];
  end
endmodule
