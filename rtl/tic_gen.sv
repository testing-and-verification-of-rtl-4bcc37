// tic_gen: tic enable for the sequencer and the ramp store.
//
// The loop logic runs on one clock at 4.875 MHz. The intra-frame sequencer and
// the ramp store step once per "tic", a period of the 2.166 MHz clock
// (0.4625 us). 2.1667 MHz is exactly 4/9 of 4.875 MHz, so instead of a second
// clock this block raises `tic` on NUM of every DEN clock cycles using a
// phase accumulator: the accumulator adds NUM each cycle and a tic is issued
// whenever it wraps past DEN. Tics are therefore 2 or 3 cycles apart and average
// exactly one per 2.25 cycles. The two clock rates are the document's; deriving
// one from the other with an enable is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), en (accumulator runs only
// when set, and restarts from zero when cleared), tic (one-cycle pulse).
module tic_gen #(
  parameter int unsigned NUM = 4,
  parameter int unsigned DEN = 9
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tic
);
  localparam int unsigned W = $clog2(DEN + NUM + 1);
  logic [W-1:0] acc;
  logic [W-1:0] sum;

  assign sum = acc + W'(NUM);
  assign tic = en && (sum >= W'(DEN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (!en)    acc <= '0;
    else if (tic)    acc <= sum - W'(DEN);
    else             acc <= sum;
  end

  initial assert (NUM > 0 && NUM <= DEN) else $error("tic_gen: need 0 < NUM <= DEN");
endmodule
