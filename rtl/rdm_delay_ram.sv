// Memory-based delay line: every clock, `din` is written into a circular
// buffer and the word written DELAY clocks earlier is presented on `dout`.
//
// The control unit of the published design keeps the input data in a memory
// while a sample spends dozens of cycles in the divider, rather than in long
// chains of registers; this is that memory. It is a simple dual-port array
// (one write, one registered read per clock) of 2^ceil(log2(DELAY)) words, so
// it maps onto a block RAM. The read address trails the write address by
// DELAY-1 and the read is registered, which gives a delay of exactly DELAY
// clocks, the same as DELAY flip-flop stages. Contents are not reset: the
// user qualifies `dout` with a valid bit carried elsewhere. DELAY >= 2.
module rdm_delay_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DELAY = 54
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned AW    = (DELAY <= 2) ? 1 : $clog2(DELAY);
  localparam int unsigned DEPTH = 1 << AW;

  if (DELAY < 2) begin : g_bad_delay
    $error("rdm_delay_ram: DELAY must be at least 2");
  end

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr;
  logic [AW-1:0]    rptr;

  assign rptr = wptr - AW'(DELAY - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wptr <= '0;
    else        wptr <= wptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    mem[wptr] <= din;
    dout      <= mem[rptr];
  end

endmodule
