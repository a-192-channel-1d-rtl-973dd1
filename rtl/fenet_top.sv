// fenet_top: streaming 1D-CNN neural feature extractor.
//
// N_STREETS x BLOCKS_PER_STREET x PES_PER_BLOCK channels (6 x 4 x 8 = 192 by
// default) each turn a stream of 9-bit sign-magnitude neural samples into
// (layers + 1) 9-bit features per bin. A central algorithm FSM (cnn_ctrl)
// and PE control FSM (pe_ctrl) broadcast one schedule and the kernel weights
// of the shared weight SRAM to every channel, so all channels compute in
// lock step on their own data.
//
// Clocks: clk is the system clock of the whole CNN solver; iclk is the
// interface clock, asynchronous to clk. The serial interface, the write side
// of the channel queues, the write side of the write queue and the read side
// of the feature return queue run on iclk. The chip also has a separate,
// faster MAC clock for word-serial arithmetic; in this design the PEs use
// clk and finish a multiply-accumulate per cycle. Resets are asynchronous,
// active low, one per domain, and are assumed to be released synchronously
// to their clocks.
//
// Data flow: SAMPLE frames on the serial port fill the 4-entry queue of the
// addressed channel; when every enabled channel has a sample, layer 0 loads
// one word into all channel SRAMs. Configuration and weight writes pass
// through the write queue. At the end of a bin the features enter the scan
// chain (street 0, block 0, channel 0, feature 0 first) and are shifted into
// the feature return queue, from where READ frames take them.
//
// Block structure, sizes and data flow follow the design description. The
// serial protocol, the single clock for the PEs, the order in which the
// streets are chained into one feature scan chain, and the status outputs
// (layer states and event pulses, for observation) are this design's.
//
// Lint note: the system reset appears both as an asynchronous flop reset and
// in the disable condition of the load/read collision assertion; that use is
// intended and is the only reason rst_n is also seen as a synchronous net.
module fenet_top
  import fenet_pkg::*;
#(
  parameter int unsigned N_STREETS         = 6,
  parameter int unsigned BLOCKS_PER_STREET = 4,
  parameter int unsigned PES_PER_BLOCK     = 8,
  parameter int unsigned AQ_DEPTH          = 4,
  localparam int unsigned CH_PER_STREET    = BLOCKS_PER_STREET * PES_PER_BLOCK,
  localparam int unsigned NCH              = N_STREETS * CH_PER_STREET
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         iclk,
  input  logic         irst_n,
  // serial data interface
  input  logic         cs_n,
  input  logic         mosi,
  output logic         miso,
  output logic         stall,
  // observation
  output layer_state_e layer_state [CONV_LAYERS],
  output logic         ev_wait_mult,
  output logic         ev_conv_startup,
  output logic         ev_conv_padding,
  output logic         ev_format_wait,
  output logic         ev_bin_done
);
  // ---------------- interface domain ----------------
  logic        wq_push, wq_is_weight, wq_full;
  logic [7:0]  wq_addr;
  logic [15:0] wq_data;
  sm9_t        aq_wdata;
  logic [NCH-1:0] aq_wen, aq_full;
  sm9_t        fq_rdata;
  logic        fq_empty, fq_pop;

  spi_if #(.NCH(NCH)) u_spi (
    .iclk, .irst_n, .cs_n, .mosi, .miso, .stall,
    .wq_push, .wq_is_weight, .wq_addr, .wq_data, .wq_full,
    .aq_wdata, .aq_wen, .aq_full,
    .fq_rdata, .fq_empty, .fq_pop
  );

  // ---------------- write queue, registers, weights ----------------
  logic        cfg_we, wt_we, wt_sel;
  logic [7:0]  cfg_addr, wt_waddr;
  logic [15:0] cfg_data;
  logic [8:0]  wt_wdata;

  write_queue u_wq (
    .iclk, .irst_n, .push(wq_push), .is_weight(wq_is_weight), .addr(wq_addr), .data(wq_data),
    .full(wq_full), .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_data, .wt_we, .wt_sel, .wt_addr(wt_waddr), .wt_data(wt_wdata)
  );

  logic                  run;
  logic [2:0]            layers;
  logic [BIN_W-1:0]      bin_strides;
  layer_cfg_t            layer_cfg [MAX_LAYERS];
  logic [NCH-1:0]        ch_en;
  logic [MAX_LAYERS-1:0] slot_en;
  logic [$clog2(NCH+1)-1:0] n_ch_en;

  config_regs #(.NCH(NCH)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_data),
    .run, .layers, .bin_strides, .layer_cfg, .ch_en, .slot_en, .n_ch_en
  );

  logic                wt_re;
  logic [WADDR_W-1:0]  wt_raddr;
  sm9_t                wt_trav, wt_feat;

  weight_sram u_wsram (
    .clk, .we(wt_we), .wsel(wt_sel), .waddr(wt_waddr), .wdata(wt_wdata),
    .re(wt_re), .raddr(wt_raddr), .wt_trav, .wt_feat
  );

  // ---------------- control ----------------
  logic               aq_ready, aq_pop;
  logic               ld_we, ld_from_pe;
  logic [SADDR_W-1:0] ld_addr;
  pe_req_e            req;
  logic [2:0]         req_slot;
  logic               req_last;
  logic [SADDR_W-1:0] act_start, part_base;
  logic [7:0]         part_k, taps;
  logic [WADDR_W-1:0] wt_start;
  logic               pe_done, pe_busy;
  logic               fq_full, feat_shift;

  cnn_ctrl #(.NCH(NCH)) u_cnn (
    .clk, .rst_n, .run, .cfg_layers(layers), .cfg_bin_strides(bin_strides),
    .cfg_layer(layer_cfg), .n_ch_en,
    .aq_ready, .aq_pop, .ld_we, .ld_addr, .ld_from_pe,
    .req, .req_slot, .req_last, .act_start, .part_base, .part_k, .wt_start, .taps,
    .pe_done, .fq_full, .feat_shift,
    .layer_state, .ev_wait_mult, .ev_conv_startup, .ev_conv_padding, .ev_format_wait,
    .ev_bin_done
  );

  logic               rd_re;
  logic [SADDR_W-1:0] rd_addr;
  pe_op_e             op;
  logic [2:0]         op_slot;
  logic               op_last;

  pe_ctrl u_pec (
    .clk, .rst_n, .req, .req_slot, .req_last, .act_start, .part_base, .part_k,
    .wt_start, .taps, .busy(pe_busy), .done(pe_done),
    .sram_re(rd_re), .sram_addr(rd_addr), .wt_re, .wt_addr(wt_raddr),
    .op, .op_slot, .op_last
  );

  // The single SRAM port is shared by loads and convolution reads; the
  // sequencer never asks for both in one cycle.
  logic               sram_en;
  logic [SADDR_W-1:0] sram_addr;
  assign sram_en   = ld_we | rd_re;
  assign sram_addr = ld_we ? ld_addr : rd_addr;

  assert property (@(posedge clk) disable iff (!rst_n) !(ld_we && (rd_re || pe_busy)));

  logic [2:0] leak, leak_term;
  logic [4:0] div;
  assign leak      = layer_cfg[op_slot].leak;
  assign leak_term = layer_cfg[TERM_SLOT].leak;
  assign div       = layer_cfg[op_slot].div;

  // ---------------- processing streets ----------------
  sm9_t chain [N_STREETS+1];
  logic [N_STREETS-1:0] st_ready;
  assign chain[N_STREETS] = '0;
  assign aq_ready = &st_ready;

  for (genvar s = 0; s < N_STREETS; s++) begin : g_street
    processing_street #(.NBLK(BLOCKS_PER_STREET), .NPE(PES_PER_BLOCK), .AQ_DEPTH(AQ_DEPTH)) u_st (
      .clk, .rst_n, .iclk, .irst_n,
      .ch_en(ch_en[s*CH_PER_STREET +: CH_PER_STREET]), .slot_en,
      .op, .op_slot, .op_last, .leak, .leak_term, .div, .wt_trav, .wt_feat,
      .sram_en, .sram_we(ld_we), .sram_addr, .ld_from_pe,
      .aq_wdata, .aq_wen(aq_wen[s*CH_PER_STREET +: CH_PER_STREET]),
      .aq_full(aq_full[s*CH_PER_STREET +: CH_PER_STREET]),
      .aq_pop, .aq_ready(st_ready[s]),
      .shift(feat_shift), .chain_in(chain[s+1]), .chain_out(chain[s])
    );
  end

  // ---------------- feature return queue ----------------
  async_queue #(.WIDTH(ACT_W), .DEPTH(4)) u_fq (
    .wclk(clk), .wrst_n(rst_n), .wen(feat_shift), .wdata(chain[0]), .wfull(fq_full),
    .rclk(iclk), .rrst_n(irst_n), .ren(fq_pop), .rdata(fq_rdata), .rempty(fq_empty)
  );
endmodule
