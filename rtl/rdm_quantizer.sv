// Quantifier Q of RDM-QIM: y = r * ( q(x/r + v, Delta) - v ).
//
// x is the host (or received) sample, r the positive reference that stands
// for the past output, v the dither chosen by the message bit. The sample is
// divided by r in the pipelined divider; the quotient plus v is rounded to the
// nearest multiple of Delta (0.25, i.e. 64 LSBs: add 32, clear the six low
// bits, ties round up); v is subtracted again; and the result is multiplied
// by r, the product being brought back to 17Q8 and saturated to 25 bits.
// r, v and a caller-defined `tag` wait out the division in a delay memory.
//
// One sample per clock. Latency: DIV_LATENCY clocks of division, one clock
// for dither / rounding and one for the multiply, so `out_valid`, `y` and
// `tag_out` follow `in_valid` by DIV_LATENCY + 2 clocks.
//
// Equations 9 and 10 of the published design, its 17Q8 and Q8 formats,
// Delta = 0.25 and the 54-cycle divider follow it; the rounding of ties, the
// saturation of the product and the pipeline split are this design's own.
module rdm_quantizer
  import rdm_qim_pkg::*;
#(
  parameter int unsigned DIV_LATENCY = 54,
  parameter int unsigned DELTA_Q8    = DELTA,
  parameter int unsigned TAG_W       = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  sample_t          x,
  input  mag_t             r,
  input  dither_t          v,
  input  logic [TAG_W-1:0] tag,
  output logic             out_valid,
  output sample_t          y,
  output logic [TAG_W-1:0] tag_out
);

  localparam int unsigned DSH     = $clog2(DELTA_Q8);
  localparam int unsigned W_W     = DATA_W + 3;            // dithered/rounded width
  localparam int unsigned P_W     = W_W + DATA_W + 1;      // product width

  if ((1 << DSH) != DELTA_Q8) begin : g_bad_delta
    $error("rdm_quantizer: DELTA_Q8 must be a power of two");
  end

  typedef struct packed {
    mag_t             r;
    dither_t          v;
    logic [TAG_W-1:0] tag;
  } side_t;

  // ---- division and side data ------------------------------------------
  logic    div_valid;
  sample_t ratio;
  side_t   side_in, side_d;

  rdm_divider #(.LATENCY(DIV_LATENCY)) u_div (
    .clk, .rst_n, .in_valid, .dividend(x), .divisor(r),
    .out_valid(div_valid), .quotient(ratio)
  );

  assign side_in = '{r: r, v: v, tag: tag};

  rdm_delay_ram #(.WIDTH($bits(side_t)), .DELAY(DIV_LATENCY)) u_side (
    .clk, .rst_n, .din(side_in), .dout(side_d)
  );

  // ---- dither, round to the Delta lattice, remove dither ---------------
  logic signed [W_W-1:0] u, q, w;
  always_comb begin
    u = W_W'(ratio) + W_W'(side_d.v);
    q = (u + W_W'(DELTA_Q8 / 2)) & ~W_W'(DELTA_Q8 - 1);
    w = q - W_W'(side_d.v);
  end

  logic                  s1_valid;
  logic signed [W_W-1:0] s1_w;
  mag_t                  s1_r;
  logic [TAG_W-1:0]      s1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_w     <= '0;
      s1_r     <= '0;
      s1_tag   <= '0;
    end else begin
      s1_valid <= div_valid;
      s1_w     <= w;
      s1_r     <= side_d.r;
      s1_tag   <= side_d.tag;
    end
  end

  // ---- multiply by the reference, back to 17Q8, saturate ---------------
  localparam logic signed [P_W-1:0] YMAX = P_W'(signed'({1'b0, {(DATA_W-1){1'b1}}}));
  localparam logic signed [P_W-1:0] YMIN = -YMAX - 1;

  logic signed [P_W-1:0] prod, scaled;
  sample_t               y_sat;
  always_comb begin
    prod   = P_W'(signed'({1'b0, s1_r})) * P_W'(s1_w);
    scaled = prod >>> FRAC_BITS;
    if (scaled > YMAX)      y_sat = sample_t'(YMAX);
    else if (scaled < YMIN) y_sat = sample_t'(YMIN);
    else                    y_sat = sample_t'(scaled);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
      tag_out   <= '0;
    end else begin
      out_valid <= s1_valid;
      y         <= y_sat;
      tag_out   <= s1_tag;
    end
  end


endmodule
