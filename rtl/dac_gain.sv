// dac_gain: forward-path gain between the integrator and the power shaper,
// H(z) = A with A one of the document's eight settings
// 1/64, 3/128, 1/32, 3/64, 1/16, 3/32, 1/8, 3/16 (Table 6).
//
// Every setting is k/128 with a small integer k, so the product with the
// 14-bit Q10.4 integrator word is kept exact by leaving the division by 128 as
// seven more fraction bits: the output is Q10.11 nits. Purely combinational.
module dac_gain
  import pac_pkg::*;
(
  input  logic [2:0]        cfg,
  input  logic [LOOP_W-1:0] x,
  output logic [DG_W-1:0]   y
);
  assign y = DG_W'(x) * DG_W'(dac_gain_k(cfg));
endmodule
