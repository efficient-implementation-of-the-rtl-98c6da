// Control unit of one RDM-QIM stage.
//
// After reset it walks through every word of the reference memories,
// asking for each to be written with 1.0, and holds the key loaded into the
// LFSR meanwhile (INIT state). It then raises `ready` and, for every accepted
// sample (`in_valid` while ready), hands out the sample's position inside its
// frame (0..FRAME_LEN-1) and the history slot of the frame (0..NUM_FRAMES-1),
// both as registered counters that advance after the sample. `accept` tells
// the datapath to take the sample and step the LFSR.
//
// The published design names a control unit that sequences the pipeline and
// says both memories start at 1; the state machine and counters are this
// design's own. Initialisation takes FRAME_LEN*NUM_FRAMES clocks.
module rdm_ctrl #(
  parameter int unsigned FRAME_LEN  = 128,
  parameter int unsigned NUM_FRAMES = 16,
  localparam int unsigned PAW = $clog2(FRAME_LEN),
  localparam int unsigned SAW = $clog2(NUM_FRAMES),
  localparam int unsigned HAW = $clog2(FRAME_LEN * NUM_FRAMES)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           ready,
  output logic           accept,
  output logic           init_we,
  output logic [HAW-1:0] init_addr,
  output logic           lfsr_load,
  output logic [PAW-1:0] pos,
  output logic [SAW-1:0] slot
);

  typedef enum logic {S_INIT, S_RUN} state_t;
  state_t state;

  localparam int unsigned LAST_ADDR = FRAME_LEN * NUM_FRAMES - 1;

  assign ready     = (state == S_RUN);
  assign accept    = ready && in_valid;
  assign init_we   = (state == S_INIT);
  assign lfsr_load = (state == S_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_INIT;
      init_addr <= '0;
      pos       <= '0;
      slot      <= '0;
    end else begin
      case (state)
        S_INIT: begin
          if (init_addr == HAW'(LAST_ADDR)) state <= S_RUN;
          else                              init_addr <= init_addr + 1'b1;
        end
        S_RUN: begin
          if (accept) begin
            if (pos == PAW'(FRAME_LEN - 1)) begin
              pos  <= '0;
              slot <= (slot == SAW'(NUM_FRAMES - 1)) ? '0 : slot + 1'b1;
            end else begin
              pos <= pos + 1'b1;
            end
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end

endmodule
