// channel_sram: the single-port SRAM shared by the eight channels of a
// channel block, 256 words of 72 bits, one 9-bit lane per channel.
//
// The chip uses a foundry low-leakage single-port macro; this is a
// synthesizable array with the same organisation (the organisation is the
// design description's, the timing is this design's choice). One access per
// cycle: with en high, we high writes the lanes selected by lane_we at addr,
// we low reads addr and the word appears on dout after the clock edge
// (one-cycle read latency). dout holds its value when no read is made.
// Because every channel of the block runs the same schedule, all lanes
// share one address.
module channel_sram #(
  parameter int unsigned LANES  = 8,
  parameter int unsigned LANE_W = 9,
  parameter int unsigned DEPTH  = 256,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic                    we,
  input  logic [LANES-1:0]        lane_we,
  input  logic [AW-1:0]           addr,
  input  logic [LANES*LANE_W-1:0] din,
  output logic [LANES*LANE_W-1:0] dout
);
  logic [LANES*LANE_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int l = 0; l < LANES; l++)
          if (lane_we[l]) mem[addr][l*LANE_W +: LANE_W] <= din[l*LANE_W +: LANE_W];
      end else begin
        dout <= mem[addr];
      end
    end
  end
endmodule
