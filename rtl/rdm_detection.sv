// RDM-QIM detection stage: recovers the hidden bit from each received
// sample z_k.
//
// Two copies of the insertion stage, one with b tied to 0 and one with b tied
// to 1, re-quantise z_k with the same key, giving the nearest points z'_k0
// and z'_k1 of the two dithered lattices. Here the reference is built from
// the received samples themselves (REF_FROM_INPUT), so a gain applied to the
// signal scales the reference equally. The decoded bit is the one whose point
// is nearer: b_hat = (|z_k - z'_k1| < |z_k - z'_k0|); a tie decodes as 0.
//
// One sample per clock; `out_valid`/`b_hat` follow an accepted sample by
// DIV_LATENCY + 4 clocks (the insertion latency plus the registered compare).
// `ready` has the meaning it has in the insertion stage. The structure follows
// the published design; the tie rule is this design's own.
module rdm_detection
  import rdm_qim_pkg::*;
#(
  parameter int unsigned    FRAME_LEN   = 128,
  parameter int unsigned    NUM_FRAMES  = 16,
  parameter int unsigned    DIV_LATENCY = 54,
  parameter int unsigned    DELTA_Q8    = DELTA,
  parameter logic [V_W-1:0] TAPS        = LFSR_TAPS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [V_W-1:0] key,
  output logic           ready,
  input  logic           in_valid,
  input  sample_t        z,
  output logic           out_valid,
  output logic           b_hat,
  output mag_t           dist0,     // |z_k - z'_k0| of the decoded sample
  output mag_t           dist1      // |z_k - z'_k1| of the decoded sample
);

  logic    rdy0, rdy1, ov0, ov1;
  sample_t zq0, zq1, zd0, zd1;

  rdm_insertion #(.FRAME_LEN(FRAME_LEN), .NUM_FRAMES(NUM_FRAMES),
                  .DIV_LATENCY(DIV_LATENCY), .DELTA_Q8(DELTA_Q8), .TAPS(TAPS),
                  .REF_FROM_INPUT(1'b1)) u_q0 (
    .clk, .rst_n, .key, .ready(rdy0), .in_valid, .x(z), .b(1'b0),
    .out_valid(ov0), .y(zq0), .x_out(zd0)
  );

  rdm_insertion #(.FRAME_LEN(FRAME_LEN), .NUM_FRAMES(NUM_FRAMES),
                  .DIV_LATENCY(DIV_LATENCY), .DELTA_Q8(DELTA_Q8), .TAPS(TAPS),
                  .REF_FROM_INPUT(1'b1)) u_q1 (
    .clk, .rst_n, .key, .ready(rdy1), .in_valid, .x(z), .b(1'b1),
    .out_valid(ov1), .y(zq1), .x_out(zd1)
  );

  assign ready = rdy0 && rdy1;

  function automatic mag_t absdiff(sample_t a, sample_t c);
    logic signed [DATA_W:0] d;
    d = {a[DATA_W-1], a} - {c[DATA_W-1], c};
    // Distances beyond the 25-bit range are held at the largest value.
    if (d[DATA_W]) d = -d;
    return d[DATA_W] ? '1 : mag_t'(d);
  endfunction

  mag_t d0, d1;
  assign d0 = absdiff(zd0, zq0);
  assign d1 = absdiff(zd1, zq1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      b_hat     <= 1'b0;
      dist0     <= '0;
      dist1     <= '0;
    end else begin
      out_valid <= ov0;
      b_hat     <= (d1 < d0);
      dist0     <= d0;
      dist1     <= d1;
    end
  end

  // Both branches see the same samples and therefore run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (ov0 == ov1) && (rdy0 == rdy1) && (!ov0 || zd0 == zd1));

endmodule
