// Shared number formats and constants of the RDM-QIM watermarking datapath.
//
// Samples, references and quotients are signed fixed point with 17 integer
// bits and 8 fractional bits (25 bits, "17Q8"); the dither v is an 8-bit
// signed value with the same 8 fractional bits ("Q8"), so one LSB is 2^-8
// everywhere and no alignment shifts are needed between the two. The
// quantisation step Delta = 0.25 is 64 LSBs. A reference of 1.0 (256 LSBs)
// is the value both g() memories start from. These formats, Delta, the
// 16-frame history and the 54-cycle divider latency follow the published
// architecture; the frame length is this design's own choice.
package rdm_qim_pkg;

  localparam int unsigned FRAC_BITS = 8;              // fractional bits of every value
  localparam int unsigned DATA_W    = 25;             // 17Q8 sample / reference width
  localparam int unsigned V_W       = 8;              // Q8 dither width
  localparam int unsigned DELTA     = 64;             // 0.25 in Q8
  localparam int unsigned ONE_Q8    = 1 << FRAC_BITS; // 1.0, initial memory contents

  typedef logic signed [DATA_W-1:0] sample_t;   // signed 17Q8
  typedef logic        [DATA_W-1:0] mag_t;      // non-negative 17Q8 magnitude
  typedef logic signed [V_W-1:0]    dither_t;   // signed Q8 dither

  // Default feedback taps of the 8-bit LFSR: x^8 + x^6 + x^5 + x^4 + 1,
  // a maximal-length polynomial (period 255). Bit i set = stage i+1 tapped.
  localparam logic [V_W-1:0] LFSR_TAPS = 8'b1011_1000;

endpackage
