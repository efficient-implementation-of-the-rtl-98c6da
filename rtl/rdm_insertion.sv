// RDM-QIM insertion stage: hides one message bit b_k in every host sample x_k,
// giving the watermarked sample
//     y_k = g * ( q(x_k / g + v_k, Delta) - v_k ),
// where g is the mean magnitude of the previous NUM_FRAMES outputs at the same
// position of a frame and v_k the key-dependent dither for b_k. Because the
// quantiser works on x_k / g and g scales with the signal, a later change of
// gain does not move the samples off their lattice.
//
// Structure: the control unit (initialisation, frame position and slot), the
// v_k generator (LFSR, phi, multiplexer), the g() reference memories and the
// quantifier. A sample accepted at one clock (`in_valid` while `ready`) reads
// its reference at that edge, enters the quantifier one clock later and leaves
// as `y` with `out_valid` LATENCY = DIV_LATENCY + 3 clocks after it was
// accepted; one sample is taken every clock. On leaving, |y| (or |x| with
// REF_FROM_INPUT, as the detector uses) updates the reference of its
// position. That update is read back only one frame later, which is why
// FRAME_LEN must exceed LATENCY: the long divider latency then never stalls
// the stream. `x_out` is the input sample aligned with `y`.
//
// After reset, `ready` stays low for FRAME_LEN*NUM_FRAMES clocks while the
// memories are set to 1.0 and `key` is loaded into the LFSR; `key` must be
// stable by the end of that time.
//
// The block structure, equation, formats and latencies of the parts follow
// the published design; the frame length, the handshake and the guard that
// keeps the divisor at least one LSB are this design's own.
module rdm_insertion
  import rdm_qim_pkg::*;
#(
  parameter int unsigned    FRAME_LEN      = 128,
  parameter int unsigned    NUM_FRAMES     = 16,
  parameter int unsigned    DIV_LATENCY    = 54,
  parameter int unsigned    DELTA_Q8       = DELTA,
  parameter logic [V_W-1:0] TAPS           = LFSR_TAPS,
  parameter bit             REF_FROM_INPUT = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [V_W-1:0] key,
  output logic           ready,
  input  logic           in_valid,
  input  sample_t        x,
  input  logic           b,
  output logic           out_valid,
  output sample_t        y,
  output sample_t        x_out
);

  localparam int unsigned LATENCY = DIV_LATENCY + 3;
  localparam int unsigned PAW = $clog2(FRAME_LEN);
  localparam int unsigned SAW = $clog2(NUM_FRAMES);
  localparam int unsigned HAW = $clog2(FRAME_LEN * NUM_FRAMES);

  if (FRAME_LEN <= LATENCY) begin : g_bad_frame
    $error("rdm_insertion: FRAME_LEN must exceed the pipeline latency %0d", LATENCY);
  end

  // ---- control unit -----------------------------------------------------
  logic           accept, init_we, lfsr_load;
  logic [HAW-1:0] init_addr;
  logic [PAW-1:0] pos;
  logic [SAW-1:0] slot;

  rdm_ctrl #(.FRAME_LEN(FRAME_LEN), .NUM_FRAMES(NUM_FRAMES)) u_ctrl (
    .clk, .rst_n, .in_valid, .ready, .accept, .init_we, .init_addr,
    .lfsr_load, .pos, .slot
  );

  // ---- v_k generation ---------------------------------------------------
  dither_t v;

  rdm_vgen #(.TAPS(TAPS), .DELTA_Q8(DELTA_Q8)) u_vgen (
    .clk, .rst_n, .load(lfsr_load), .key, .step(accept), .b, .v
  );

  // ---- stage 1: sample registered while its reference is read -----------
  typedef struct packed {
    sample_t        x;
    logic [PAW-1:0] pos;
    logic [SAW-1:0] slot;
    mag_t           avg;
    mag_t           old;
  } tag_t;

  logic           s1_valid;
  sample_t        s1_x;
  dither_t        s1_v;
  logic [PAW-1:0] s1_pos;
  logic [SAW-1:0] s1_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_x     <= '0;
      s1_v     <= '0;
      s1_pos   <= '0;
      s1_slot  <= '0;
    end else begin
      s1_valid <= accept;
      s1_x     <= x;
      s1_v     <= v;
      s1_pos   <= pos;
      s1_slot  <= slot;
    end
  end

  // ---- reference memories (g) -------------------------------------------
  mag_t rd_avg, rd_old, up_new;
  logic q_valid;
  sample_t q_y;
  tag_t q_tag;

  rdm_g_avg #(.FRAME_LEN(FRAME_LEN), .NUM_FRAMES(NUM_FRAMES)) u_g (
    .clk, .init_we, .init_addr,
    .rd_en(accept), .rd_pos(pos), .rd_slot(slot), .rd_avg, .rd_old,
    .up_en(q_valid), .up_pos(q_tag.pos), .up_slot(q_tag.slot), .up_new,
    .up_avg_prev(q_tag.avg), .up_old(q_tag.old), .up_avg_new()
  );

  // The divisor never drops below one LSB.
  mag_t r;
  assign r = (rd_avg == '0) ? mag_t'(1) : rd_avg;

  // ---- quantifier -------------------------------------------------------
  tag_t s1_tag;
  assign s1_tag = '{x: s1_x, pos: s1_pos, slot: s1_slot, avg: rd_avg, old: rd_old};

  rdm_quantizer #(.DIV_LATENCY(DIV_LATENCY), .DELTA_Q8(DELTA_Q8),
                  .TAG_W($bits(tag_t))) u_q (
    .clk, .rst_n, .in_valid(s1_valid), .x(s1_x), .r, .v(s1_v),
    .tag(s1_tag), .out_valid(q_valid), .y(q_y), .tag_out(q_tag)
  );

  // ---- feedback: magnitude of the output (or of the input) --------------
  sample_t fb;
  assign fb     = REF_FROM_INPUT ? q_tag.x : q_y;
  assign up_new = fb[DATA_W-1] ? mag_t'(-fb) : mag_t'(fb);

  assign out_valid = q_valid;
  assign y         = q_y;
  assign x_out     = q_tag.x;

  // No sample may be accepted while the memories are being initialised.
  a_no_accept_in_init: assert property (@(posedge clk) disable iff (!rst_n)
                                        accept |-> !init_we);

endmodule
