// spi_if: serial data interface with flow control (interface clock domain).
//
// The chip is reached through one serial port that configures registers,
// loads the weight SRAM, streams neural samples into the channel queues and
// returns features; this follows the design description, which does not
// give the protocol. The protocol below is this design's own.
//
// A frame is 32 bits, MSB first, on mosi while cs_n is low, one bit per
// rising edge of iclk; cs_n must be high for at least one cycle between
// frames. Frame layout: [31:28] command, [27:20] address, [15:0] data.
//   1 CFG     configuration register write  (address, data)
//   2 WEIGHT  weight write (address = tap, data[9] = 0 traversal /
//             1 feature, data[8:0] = sign-magnitude weight)
//   3 SAMPLE  neural sample data[8:0] for channel 'address'
//   4 READ    read one feature
// During every frame miso returns, MSB first, the status captured while
// cs_n was high: [31] feature valid, [30] stall (some channel queue full),
// [29] the last sample or write was dropped because its queue was full,
// [8:0] the oldest feature. A READ frame removes that feature if it was
// valid. A SAMPLE for a full queue, or a write when the write queue is
// full, is dropped and flagged; the host retries (back-pressure).
// Decoded writes leave on the cycle after the last bit.
module spi_if #(
  parameter int unsigned NCH = 192
) (
  input  logic           iclk,
  input  logic           irst_n,
  input  logic           cs_n,
  input  logic           mosi,
  output logic           miso,
  output logic           stall,
  // write queue (configuration and weights)
  output logic           wq_push,
  output logic           wq_is_weight,
  output logic [7:0]     wq_addr,
  output logic [15:0]    wq_data,
  input  logic           wq_full,
  // channel queues: shared data bus and per-channel write enables
  output logic [8:0]     aq_wdata,
  output logic [NCH-1:0] aq_wen,
  input  logic [NCH-1:0] aq_full,
  // feature return queue
  input  logic [8:0]     fq_rdata,
  input  logic           fq_empty,
  output logic           fq_pop
);
  localparam logic [3:0] C_CFG = 4'd1, C_WEIGHT = 4'd2, C_SAMPLE = 4'd3, C_READ = 4'd4;

  logic [30:0] rx;
  logic [4:0]  cnt;
  logic [31:0] tx;
  logic        dropped;
  logic        cap_valid;
  logic [31:0] frame;
  logic        last_bit;

  assign stall    = |aq_full;
  assign frame    = {rx, mosi};
  assign last_bit = !cs_n && (cnt == 5'd31);
  assign miso     = tx[31];

  always_ff @(posedge iclk or negedge irst_n) begin
    if (!irst_n) begin
      rx <= '0; cnt <= '0; tx <= '0; dropped <= 1'b0; cap_valid <= 1'b0;
      wq_push <= 1'b0; wq_is_weight <= 1'b0; wq_addr <= '0; wq_data <= '0;
      aq_wdata <= '0; aq_wen <= '0; fq_pop <= 1'b0;
    end else begin
      wq_push <= 1'b0;
      aq_wen  <= '0;
      fq_pop  <= 1'b0;
      if (cs_n) begin
        cnt       <= '0;
        tx        <= {!fq_empty, stall, dropped, 20'b0, fq_rdata};
        cap_valid <= !fq_empty;
      end else begin
        rx  <= frame[30:0];
        cnt <= cnt + 1'b1;
        tx  <= {tx[30:0], 1'b0};
        if (last_bit) begin
          unique case (frame[31:28])
            C_CFG, C_WEIGHT: begin
              if (wq_full) dropped <= 1'b1;
              else begin
                wq_push      <= 1'b1;
                wq_is_weight <= (frame[31:28] == C_WEIGHT);
                wq_addr      <= frame[27:20];
                wq_data      <= frame[15:0];
                dropped      <= 1'b0;
              end
            end
            C_SAMPLE: begin
              if (int'(frame[27:20]) >= NCH || aq_full[frame[27:20]]) dropped <= 1'b1;
              else begin
                aq_wen[frame[27:20]] <= 1'b1;
                aq_wdata             <= frame[8:0];
                dropped              <= 1'b0;
              end
            end
            C_READ: fq_pop <= cap_valid;
            default: ;
          endcase
        end
      end
    end
  end
endmodule
