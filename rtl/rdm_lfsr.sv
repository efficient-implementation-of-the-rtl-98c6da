// Key-seeded pseudo-random dither generator (the LFSR block of the v_k stage).
//
// An 8-bit Fibonacci shift register: the XOR of the tapped stages is shifted
// in at the bottom on every `step`. Its state, read as a signed Q8 number in
// [-0.5, 0.5), is the dither v_k0 used for message bit 0. `load` copies the
// key into the register; a key of zero, which would lock the register, is
// replaced by 1. `value` is the current state (no latency); after `step` the
// next value appears one clock later.
//
// The Q8 output format and seeding from a key follow the published design.
// The feedback polynomial is a parameter: the default x^8+x^6+x^5+x^4+1 is a
// maximal-length 8-bit polynomial (period 255), chosen because the published
// design asks for the longest sequence the Q8 word allows.
module rdm_lfsr
  import rdm_qim_pkg::*;
#(
  parameter logic [V_W-1:0] TAPS = LFSR_TAPS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,   // copy seed into the register
  input  logic [V_W-1:0] seed,   // the key
  input  logic           step,   // advance by one state
  output dither_t        value   // current pseudo-random Q8 value
);

  logic [V_W-1:0] state;
  logic           fb;

  assign fb    = ^(state & TAPS);
  assign value = dither_t'(state);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= V_W'(1);
    else if (load)
      state <= (seed == '0) ? V_W'(1) : seed;
    else if (step)
      state <= {state[V_W-2:0], fb};
  end

  // A maximal-length register never reaches the all-zero state.
  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
