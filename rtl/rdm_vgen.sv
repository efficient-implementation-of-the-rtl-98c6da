// v_k generation stage: one dither value per sample, chosen by the message bit.
//
// The key-seeded LFSR produces v_k0; phi of it gives v_k1; a multiplexer
// driven by b_k picks one of them. The LFSR advances once per accepted
// sample, so an inserter and a detector seeded with the same key and fed the
// same number of samples use the same dither sequence.
//
// Timing: `v` is combinational from the current LFSR state and `b`; `step`
// moves to the next state at the clock edge. `load` (re)seeds from `key`.
// The structure follows the published design.
module rdm_vgen
  import rdm_qim_pkg::*;
#(
  parameter logic [V_W-1:0] TAPS     = LFSR_TAPS,
  parameter int unsigned    DELTA_Q8 = DELTA
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [V_W-1:0] key,
  input  logic           step,
  input  logic           b,      // message bit b_k
  output dither_t        v       // v_k
);

  dither_t v0, v1;

  rdm_lfsr #(.TAPS(TAPS)) u_lfsr (
    .clk, .rst_n, .load, .seed(key), .step, .value(v0)
  );

  rdm_phi #(.DELTA_Q8(DELTA_Q8)) u_phi (.v_in(v0), .v_out(v1));

  assign v = b ? v1 : v0;

endmodule
