// RDM-QIM watermarking core: an insertion stage and a detection stage side
// by side, each streaming one sample per clock.
//
// The insertion side takes host samples x_k with message bits b_k and emits
// watermarked samples y_k. The detection side takes received samples z_k
// (y_k after whatever the channel did to it, for instance a change of gain)
// and emits the decoded bits. Both sides need the same key and must see the
// samples in the same frame order; they are otherwise independent and have
// their own handshakes, so they can be used apart. All samples are signed
// 17Q8 (25 bits). Latencies: insertion DIV_LATENCY + 3 clocks, detection
// DIV_LATENCY + 4 clocks. Both sides hold `ready` low for
// FRAME_LEN*NUM_FRAMES clocks after reset while their memories are set up.
//
// Pairing the two stages this way follows the published design; the shared
// parameter set and the port naming are this design's own.
module rdm_qim_top
  import rdm_qim_pkg::*;
#(
  parameter int unsigned FRAME_LEN   = 128,
  parameter int unsigned NUM_FRAMES  = 16,
  parameter int unsigned DIV_LATENCY = 54
) (
  input  logic           clk,
  input  logic           rst_n,
  // insertion stage
  input  logic [V_W-1:0] ins_key,
  output logic           ins_ready,
  input  logic           ins_valid,
  input  sample_t        ins_x,
  input  logic           ins_b,
  output logic           ins_out_valid,
  output sample_t        ins_y,
  // detection stage
  input  logic [V_W-1:0] det_key,
  output logic           det_ready,
  input  logic           det_valid,
  input  sample_t        det_z,
  output logic           det_out_valid,
  output logic           det_b_hat,
  output mag_t           det_dist0,
  output mag_t           det_dist1
);

  rdm_insertion #(.FRAME_LEN(FRAME_LEN), .NUM_FRAMES(NUM_FRAMES),
                  .DIV_LATENCY(DIV_LATENCY)) u_ins (
    .clk, .rst_n, .key(ins_key), .ready(ins_ready), .in_valid(ins_valid),
    .x(ins_x), .b(ins_b), .out_valid(ins_out_valid), .y(ins_y),
    .x_out()
  );

  rdm_detection #(.FRAME_LEN(FRAME_LEN), .NUM_FRAMES(NUM_FRAMES),
                  .DIV_LATENCY(DIV_LATENCY)) u_det (
    .clk, .rst_n, .key(det_key), .ready(det_ready), .in_valid(det_valid),
    .z(det_z), .out_valid(det_out_valid), .b_hat(det_b_hat),
    .dist0(det_dist0), .dist1(det_dist1)
  );

endmodule
