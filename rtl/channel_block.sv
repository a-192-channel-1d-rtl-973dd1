// channel_block: eight processing elements with their asynchronous queues
// around one shared 72-bit x 256 single-port SRAM.
//
// Every channel owns a 9-bit lane of each SRAM word; all lanes use the same
// address because the control is broadcast and every channel runs the same
// schedule. A load writes each enabled lane either with the sample at the
// head of that channel's queue (first layer) or with the PE's intermediate
// feature register (higher layers); a convolution reads one word per tap
// and hands each PE its own lane. The block's feature shift registers are
// chained PE 0 (nearest chain_out) to PE 7 (chain_in side).
//
// The grouping of 8 PEs, 8 queues of 4 entries and one shared SRAM follows
// the design description; power gating is represented by ch_en, which
// freezes a channel and removes it from the queue check and the scan chain.
// aq_ready is high when every enabled channel's queue holds a sample.
module channel_block
  import fenet_pkg::*;
#(
  parameter int unsigned NPE      = 8,
  parameter int unsigned AQ_DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  iclk,
  input  logic                  irst_n,
  input  logic [NPE-1:0]        ch_en,
  input  logic [MAX_LAYERS-1:0] slot_en,
  // broadcast PE control
  input  pe_op_e                op,
  input  logic [2:0]            op_slot,
  input  logic                  op_last,
  input  logic [2:0]            leak,
  input  logic [2:0]            leak_term,
  input  logic [4:0]            div,
  input  sm9_t                  wt_trav,
  input  sm9_t                  wt_feat,
  // SRAM access
  input  logic                  sram_en,
  input  logic                  sram_we,
  input  logic [SADDR_W-1:0]    sram_addr,
  input  logic                  ld_from_pe,
  // channel queues
  input  sm9_t                  aq_wdata,
  input  logic [NPE-1:0]        aq_wen,
  output logic [NPE-1:0]        aq_full,
  input  logic                  aq_pop,
  output logic                  aq_ready,
  // feature scan chain
  input  logic                  shift,
  input  sm9_t                  chain_in,
  output sm9_t                  chain_out
);
  logic [NPE*ACT_W-1:0] din, dout;
  sm9_t aq_head [NPE];
  logic [NPE-1:0] aq_empty;
  sm9_t inter [NPE];
  sm9_t chain [NPE+1];

  channel_sram #(.LANES(NPE), .LANE_W(ACT_W), .DEPTH(SDEPTH)) u_sram (
    .clk, .en(sram_en), .we(sram_we), .lane_we(ch_en), .addr(sram_addr), .din, .dout
  );

  assign chain[NPE] = chain_in;
  assign chain_out  = chain[0];
  assign aq_ready   = &(~aq_empty | ~ch_en);

  for (genvar i = 0; i < NPE; i++) begin : g_ch
    async_queue #(.WIDTH(ACT_W), .DEPTH(AQ_DEPTH)) u_aq (
      .wclk(iclk), .wrst_n(irst_n), .wen(aq_wen[i]), .wdata(aq_wdata), .wfull(aq_full[i]),
      .rclk(clk), .rrst_n(rst_n), .ren(aq_pop && ch_en[i]), .rdata(aq_head[i]), .rempty(aq_empty[i])
    );

    assign din[i*ACT_W +: ACT_W] = ld_from_pe ? inter[i] : aq_head[i];

    pe u_pe (
      .clk, .rst_n, .ch_en(ch_en[i]), .slot_en,
      .op, .op_slot, .op_last, .leak, .leak_term, .div, .wt_trav, .wt_feat,
      .act(dout[i*ACT_W +: ACT_W]), .inter(inter[i]),
      .shift, .chain_in(chain[i+1]), .chain_out(chain[i])
    );
  end
endmodule
