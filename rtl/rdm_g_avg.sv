// Reference memory for g(): the mean magnitude of the last NUM_FRAMES values
// seen at the same position of a frame.
//
// Samples arrive in frames of FRAME_LEN positions. A history memory keeps the
// magnitude of the value at each position for each of the last NUM_FRAMES
// frames (frame slot x position, one word each), and an auxiliary memory keeps
// the current mean per position, so the reference is one memory read instead
// of NUM_FRAMES. When a new value y_k arrives for a position, the value
// y_{k-16} it replaces and the previous mean give the new mean:
//     mean_k = (mean_{k-1} * 16 + y_k - y_{k-16}) / 16
// with the multiply and divide done as shifts by log2(NUM_FRAMES). The
// truncating right shift lets the stored mean fall slightly below the exact
// mean over time; a result below zero is held at zero.
//
// Interface: a read (`rd_en`, position, frame slot) returns the mean and the
// value to be replaced one clock later. An update (`up_en`) writes the new
// magnitude into the history and the new mean, computed from the previous
// mean and old value the caller read earlier and carried along, into the
// auxiliary memory, both at the clock edge. `init_we` writes 1.0 into history
// word `init_addr` and, for addresses below FRAME_LEN, into that mean; the
// control unit sweeps all addresses this way after reset.
//
// The two memories, the update rule, the 16 frames, the 17Q8 format and the
// initial value of 1 follow the published design. Storing magnitudes (the
// |.| on the feedback path) and the frame length are this design's choices.
module rdm_g_avg
  import rdm_qim_pkg::*;
#(
  parameter int unsigned FRAME_LEN  = 128,
  parameter int unsigned NUM_FRAMES = 16,
  localparam int unsigned PAW = $clog2(FRAME_LEN),
  localparam int unsigned SAW = $clog2(NUM_FRAMES),
  localparam int unsigned HAW = $clog2(FRAME_LEN * NUM_FRAMES)
) (
  input  logic           clk,
  input  logic           init_we,
  input  logic [HAW-1:0] init_addr,
  input  logic           rd_en,
  input  logic [PAW-1:0] rd_pos,
  input  logic [SAW-1:0] rd_slot,
  output mag_t           rd_avg,
  output mag_t           rd_old,
  input  logic           up_en,
  input  logic [PAW-1:0] up_pos,
  input  logic [SAW-1:0] up_slot,
  input  mag_t           up_new,
  input  mag_t           up_avg_prev,
  input  mag_t           up_old,
  output mag_t           up_avg_new
);

  if ((1 << SAW) != NUM_FRAMES) begin : g_bad_frames
    $error("rdm_g_avg: NUM_FRAMES must be a power of two");
  end

  mag_t hist [FRAME_LEN * NUM_FRAMES];
  mag_t avg  [FRAME_LEN];

  function automatic logic [HAW-1:0] haddr(logic [SAW-1:0] slot, logic [PAW-1:0] pos);
    return HAW'(slot) * HAW'(FRAME_LEN) + HAW'(pos);
  endfunction

  // Eq. 12: shift up, add new, remove oldest, shift down; clamp at zero.
  localparam int unsigned SUM_W = DATA_W + SAW + 2;
  logic signed [SUM_W-1:0] sum;
  always_comb begin
    sum = (SUM_W'(up_avg_prev) << SAW) + SUM_W'(up_new) - SUM_W'(up_old);
    if (sum < 0) up_avg_new = '0;
    else         up_avg_new = mag_t'(sum >>> SAW);
  end

  always_ff @(posedge clk) begin
    if (init_we) begin
      hist[init_addr] <= mag_t'(ONE_Q8);
      if (init_addr < HAW'(FRAME_LEN))
        avg[PAW'(init_addr)] <= mag_t'(ONE_Q8);
    end else if (up_en) begin
      hist[haddr(up_slot, up_pos)] <= up_new;
      avg[up_pos]                  <= up_avg_new;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_avg <= avg[rd_pos];
      rd_old <= hist[haddr(rd_slot, rd_pos)];
    end
  end

endmodule
