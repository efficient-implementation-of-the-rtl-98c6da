// Dither transformation phi: derives the dither for message bit 1 from the
// dither for bit 0 by moving it half a quantisation step towards zero's other
// side: phi(v) = v + Delta/2 when v < 0, v - Delta/2 otherwise. The two
// dithers then select two interleaved lattices offset by Delta/2.
//
// Purely combinational, 8-bit signed Q8 in and out. With Delta = 0.25
// (64 LSBs) the result cannot overflow the 8-bit range. The rule and Delta
// follow the published design.
module rdm_phi
  import rdm_qim_pkg::*;
#(
  parameter int unsigned DELTA_Q8 = DELTA
) (
  input  dither_t v_in,
  output dither_t v_out
);

  localparam dither_t HALF = dither_t'(DELTA_Q8 / 2);

  always_comb begin
    if (v_in < 0) v_out = v_in + HALF;
    else          v_out = v_in - HALF;
  end

endmodule
