// Pipelined fixed-point divider: quotient = dividend / divisor in 17Q8.
//
// The dividend is a signed 17Q8 sample, the divisor an unsigned 17Q8
// reference. The quotient is formed as (|dividend| << 8) / divisor with a
// restoring long division that settles one quotient bit per pipeline stage
// (33 stages), then given the dividend's sign (truncation toward zero). Only
// the 25 least significant quotient bits are kept: like the published
// design, which truncates a wide fixed-point quotient to 17Q8, an
// out-of-range quotient wraps instead of saturating. Further register stages
// pad the pipeline to LATENCY cycles, so a new division can start every clock
// and its result appears exactly LATENCY clocks later, with `out_valid`.
//
// The 25-bit operand widths, the 17Q8 result and the 54-cycle latency follow
// the published design, which used a vendor divider core; this restoring
// pipeline is this design's own. A zero divisor gives an all-ones magnitude.
module rdm_divider
  import rdm_qim_pkg::*;
#(
  parameter int unsigned LATENCY = 54
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t dividend,
  input  mag_t    divisor,
  output logic    out_valid,
  output sample_t quotient
);

  localparam int unsigned NB    = DATA_W + FRAC_BITS; // quotient bits computed
  localparam int unsigned R_W   = DATA_W + 1;         // partial remainder width
  localparam int unsigned NSTG  = NB + 1;             // input stage + bit stages
  localparam int unsigned NPAD  = LATENCY - NSTG;     // extra delay stages

  if (LATENCY < NSTG) begin : g_bad_latency
    $error("rdm_divider: LATENCY must be at least %0d", NSTG);
  end

  typedef struct packed {
    logic          valid;
    logic          neg;
    logic [R_W-1:0] rem;
    logic [NB-1:0] num;   // dividend bits still to be consumed (MSB first)
    logic [NB-1:0] q;     // quotient bits settled so far (shifted in at LSB)
    mag_t          d;
  } stage_t;

  stage_t st [NB+1];

  // Input stage: take magnitude and sign.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else begin
      st[0].valid <= in_valid;
      st[0].neg   <= dividend[DATA_W-1];
      st[0].rem   <= '0;
      st[0].num   <= {(dividend[DATA_W-1] ? mag_t'(-dividend) : mag_t'(dividend)),
                      FRAC_BITS'(0)};
      st[0].q     <= '0;
      st[0].d     <= divisor;
    end
  end

  // One quotient bit per stage.
  for (genvar s = 0; s < NB; s++) begin : g_bit
    logic [R_W-1:0] trial;
    logic [R_W:0]   diff;
    assign trial = {st[s].rem[R_W-2:0], st[s].num[NB-1]};
    assign diff  = {1'b0, trial} - {2'b00, st[s].d};

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[s+1] <= '0;
      end else begin
        st[s+1].valid <= st[s].valid;
        st[s+1].neg   <= st[s].neg;
        st[s+1].d     <= st[s].d;
        st[s+1].num   <= {st[s].num[NB-2:0], 1'b0};
        if (!diff[R_W]) begin
          st[s+1].rem <= diff[R_W-1:0];
          st[s+1].q   <= {st[s].q[NB-2:0], 1'b1};
        end else begin
          st[s+1].rem <= trial;
          st[s+1].q   <= {st[s].q[NB-2:0], 1'b0};
        end
      end
    end
  end

  // Sign, truncation to 25 bits, and padding up to LATENCY.
  sample_t q_signed;
  assign q_signed = st[NB].neg ? sample_t'(-st[NB].q[DATA_W-1:0])
                               : sample_t'(st[NB].q[DATA_W-1:0]);

  if (NPAD == 0) begin : g_nopad
    assign out_valid = st[NB].valid;
    assign quotient  = q_signed;
  end else begin : g_pad
    logic    pv [NPAD];
    sample_t pq [NPAD];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(NPAD); i++) begin
          pv[i] <= 1'b0;
          pq[i] <= '0;
        end
      end else begin
        pv[0] <= st[NB].valid;
        pq[0] <= q_signed;
        for (int i = 1; i < int'(NPAD); i++) begin
          pv[i] <= pv[i-1];
          pq[i] <= pq[i-1];
        end
      end
    end
    assign out_valid = pv[NPAD-1];
    assign quotient  = pq[NPAD-1];
  end

endmodule
