// processing_street: a chain of channel blocks that share the broadcast
// control, the activation bus and one feature scan chain.
//
// Block 0 is nearest chain_out. The default of 4 blocks of 8 channels
// (32 channels per street) is the chip's arrangement; the chip places six
// streets side by side. Ports are the channel block's, with the per-channel
// vectors concatenated (channel c of the street is bit c, block c / NPE).
module processing_street
  import fenet_pkg::*;
#(
  parameter int unsigned NBLK     = 4,
  parameter int unsigned NPE      = 8,
  parameter int unsigned AQ_DEPTH = 4,
  localparam int unsigned NCH     = NBLK * NPE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  iclk,
  input  logic                  irst_n,
  input  logic [NCH-1:0]        ch_en,
  input  logic [MAX_LAYERS-1:0] slot_en,
  input  pe_op_e                op,
  input  logic [2:0]            op_slot,
  input  logic                  op_last,
  input  logic [2:0]            leak,
  input  logic [2:0]            leak_term,
  input  logic [4:0]            div,
  input  sm9_t                  wt_trav,
  input  sm9_t                  wt_feat,
  input  logic                  sram_en,
  input  logic                  sram_we,
  input  logic [SADDR_W-1:0]    sram_addr,
  input  logic                  ld_from_pe,
  input  sm9_t                  aq_wdata,
  input  logic [NCH-1:0]        aq_wen,
  output logic [NCH-1:0]        aq_full,
  input  logic                  aq_pop,
  output logic                  aq_ready,
  input  logic                  shift,
  input  sm9_t                  chain_in,
  output sm9_t                  chain_out
);
  sm9_t chain [NBLK+1];
  logic [NBLK-1:0] rdy;

  assign chain[NBLK] = chain_in;
  assign chain_out   = chain[0];
  assign aq_ready    = &rdy;

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    channel_block #(.NPE(NPE), .AQ_DEPTH(AQ_DEPTH)) u_blk (
      .clk, .rst_n, .iclk, .irst_n,
      .ch_en(ch_en[b*NPE +: NPE]), .slot_en,
      .op, .op_slot, .op_last, .leak, .leak_term, .div, .wt_trav, .wt_feat,
      .sram_en, .sram_we, .sram_addr, .ld_from_pe,
      .aq_wdata, .aq_wen(aq_wen[b*NPE +: NPE]), .aq_full(aq_full[b*NPE +: NPE]),
      .aq_pop, .aq_ready(rdy[b]),
      .shift, .chain_in(chain[b+1]), .chain_out(chain[b])
    );
  end
endmodule
