// cnn_ctrl: the algorithm control FSM, shared by all channels.
//
// It schedules the streaming 1D CNN so that no full bin of samples is ever
// stored. Layer l owns a circular partition of K_l words in every channel's
// SRAM (partitions are packed from address 0, and the weights of layer l sit
// at the same base in the weight SRAM). A bin of B = S_0 * bin_strides
// samples enters layer 0; layer l receives N_l values and produces
// N_{l+1} = floor((N_l + K_l - 1) / S_l) outputs, output i being
//   sum_{j=0}^{K_l-1} x[S_l*(i+1) - 1 - j] * w[j],   x outside 0..N_l-1 = 0.
// Taps that fall outside the bin are not computed at all: the kernel grows
// while a bin starts (startup padding), has full length in steady state, and
// shrinks after the last sample (conclusional padding).
//
// Each decision cycle it picks one action, highest-order layer first:
//   CONVOLVE layer l when its newest needed sample is loaded and layer l+1
//            has room for the result (otherwise l waits in WAIT MULT);
//   then UPDATE (LReLU and pooling) and, below the last layer, LOAD the
//            traversal result into layer l+1's partition;
//   LOAD DATA into layer 0 from the channel queues when every enabled
//            channel has a sample and the partition has room;
//   WAIT FOR FORMAT: a layer that produced all its outputs has its pooling
//            register formatted into the feature register (the last layer
//            also formats the terminal slot 7), once the previous bin's
//            features have all left the scan chain;
//   FINISH:  when every layer is formatted, the counters restart for the
//            next bin and the feature export begins.
// The export runs in the background: one scan-chain shift per cycle while
// the feature return queue has room, (layers + 1) words per enabled channel.
//
// The per-layer states, the priority of higher layers, the growing and
// shrinking kernel, loading triggered by the lower layer, and the stall of
// new data during conclusional padding follow the design description. The
// single sequencer (one action at a time, so the single-port SRAM never sees
// two accesses in a cycle) and the export hand-shake are this design's
// choices.
//
// Interface: cfg_* come from the configuration registers and must be stable
// while run is high; dropping run restarts the bin. aq_ready means every
// enabled channel queue holds a sample. The PE request outputs go to pe_ctrl.
module cnn_ctrl
  import fenet_pkg::*;
#(
  parameter int unsigned NCH = 192
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  run,
  input  logic [2:0]            cfg_layers,     // number of convolving layers, 1..7
  input  logic [BIN_W-1:0]      cfg_bin_strides,
  input  layer_cfg_t            cfg_layer [MAX_LAYERS],
  input  logic [$clog2(NCH+1)-1:0] n_ch_en,
  // channel queues
  input  logic                  aq_ready,
  output logic                  aq_pop,
  // SRAM writes (loads)
  output logic                  ld_we,
  output logic [SADDR_W-1:0]    ld_addr,
  output logic                  ld_from_pe,     // 1: intermediate register, 0: queue
  // PE control FSM
  output pe_req_e               req,
  output logic [2:0]            req_slot,
  output logic                  req_last,
  output logic [SADDR_W-1:0]    act_start,
  output logic [SADDR_W-1:0]    part_base,
  output logic [7:0]            part_k,
  output logic [WADDR_W-1:0]    wt_start,
  output logic [7:0]            taps,
  input  logic                  pe_done,
  // feature export
  input  logic                  fq_full,
  output logic                  feat_shift,
  // status and events (one-cycle pulses)
  output layer_state_e          layer_state [CONV_LAYERS],
  output logic                  ev_wait_mult,
  output logic                  ev_conv_startup,
  output logic                  ev_conv_padding,
  output logic                  ev_format_wait,
  output logic                  ev_bin_done
);
  typedef enum logic [2:0] {
    Q_DECIDE, Q_LOAD0, Q_CONV, Q_UPDATE, Q_LOADN, Q_FORMAT, Q_FORMAT_T
  } seq_e;

  seq_e seq;
  logic [2:0] cur;                        // layer being served

  logic [CNT_W-1:0] in_cnt  [CONV_LAYERS];
  logic [CNT_W-1:0] out_cnt [CONV_LAYERS];
  logic [CNT_W-1:0] win_end [CONV_LAYERS]; // S*(out_cnt+1): one past the next window's end
  logic [7:0]       wptr    [CONV_LAYERS];
  logic [CONV_LAYERS-1:0] formatted;
  logic             term_formatted;
  logic [CNT_W-1:0] export_cnt;

  // Derived per-layer quantities.
  logic [CNT_W-1:0] n_in  [CONV_LAYERS+1];
  logic [SADDR_W:0] base  [CONV_LAYERS+1];
  logic [CONV_LAYERS-1:0] active, last, conv_ready, room, done_l;
  logic [CNT_W-1:0] need  [CONV_LAYERS];

  always_comb begin
    n_in[0] = CNT_W'(cfg_layer[0].s) * CNT_W'(cfg_bin_strides);
    base[0] = '0;
    for (int l = 0; l < CONV_LAYERS; l++) begin
      n_in[l+1] = (cfg_layer[l].s == 0) ? '0
                : CNT_W'((n_in[l] + CNT_W'(cfg_layer[l].k) - 1'b1) / CNT_W'(cfg_layer[l].s));
      base[l+1] = base[l] + (SADDR_W+1)'(cfg_layer[l].k);
    end
    for (int l = 0; l < CONV_LAYERS; l++) begin
      active[l]     = (l < int'(cfg_layers));
      last[l]       = (l == int'(cfg_layers) - 1);
      need[l]       = (win_end[l] < n_in[l]) ? win_end[l] : n_in[l];
      done_l[l]     = active[l] && (out_cnt[l] >= n_in[l+1]);
      conv_ready[l] = active[l] && !done_l[l] && (in_cnt[l] >= need[l]);
      room[l]       = active[l] && (in_cnt[l] < n_in[l]) && (in_cnt[l] < win_end[l]);
    end
  end

  // Choice of the next action.
  logic       pick_conv;
  logic [2:0] pick_l;
  logic       pick_fmt;
  logic [2:0] pick_fl;
  logic       all_fmt;
  always_comb begin
    pick_conv = 1'b0;
    pick_l    = '0;
    for (int l = CONV_LAYERS-1; l >= 0; l--)
      if (!pick_conv && conv_ready[l] && (last[l] || room[l+1 < CONV_LAYERS ? l+1 : l])) begin
        pick_conv = 1'b1;
        pick_l    = 3'(l);
      end
    pick_fmt = 1'b0;
    pick_fl  = '0;
    for (int l = CONV_LAYERS-1; l >= 0; l--)
      if (done_l[l] && !formatted[l]) begin
        pick_fmt = 1'b1;
        pick_fl  = 3'(l);
      end
    all_fmt = term_formatted;
    for (int l = 0; l < CONV_LAYERS; l++)
      if (active[l] && !formatted[l]) all_fmt = 1'b0;
  end

  // Convolution window of the chosen layer.
  logic [CNT_W-1:0] lo_c, taps_c;
  assign lo_c   = (win_end[pick_l] > CNT_W'(cfg_layer[pick_l].k))
                ? win_end[pick_l] - CNT_W'(cfg_layer[pick_l].k) : '0;
  assign taps_c = in_cnt[pick_l] - lo_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq <= Q_DECIDE;
      cur <= '0;
      req <= REQ_NONE;
      req_slot <= '0;
      req_last <= 1'b0;
      act_start <= '0;
      part_base <= '0;
      part_k <= '0;
      wt_start <= '0;
      taps <= '0;
      formatted <= '0;
      term_formatted <= 1'b0;
      export_cnt <= '0;
      for (int l = 0; l < CONV_LAYERS; l++) begin
        in_cnt[l]  <= '0;
        out_cnt[l] <= '0;
        win_end[l] <= '0;
        wptr[l]    <= '0;
      end
    end else if (!run) begin
      seq <= Q_DECIDE;
      req <= REQ_NONE;
      formatted <= '0;
      term_formatted <= 1'b0;
      export_cnt <= '0;
      for (int l = 0; l < CONV_LAYERS; l++) begin
        in_cnt[l]  <= '0;
        out_cnt[l] <= '0;
        win_end[l] <= CNT_W'(cfg_layer[l].s);
        wptr[l]    <= '0;
      end
    end else begin
      req <= REQ_NONE;
      if (feat_shift) export_cnt <= export_cnt - 1'b1;
      unique case (seq)
        Q_DECIDE: begin
          if (pick_conv) begin
            cur       <= pick_l;
            seq       <= Q_CONV;
            req       <= REQ_CONVOLVE;
            req_slot  <= pick_l;
            req_last  <= last[pick_l];
            part_base <= base[pick_l][SADDR_W-1:0];
            part_k    <= cfg_layer[pick_l].k;
            act_start <= base[pick_l][SADDR_W-1:0]
                       + ((wptr[pick_l] == 0) ? cfg_layer[pick_l].k - 1'b1 : wptr[pick_l] - 1'b1);
            wt_start  <= base[pick_l][SADDR_W-1:0] + WADDR_W'(win_end[pick_l] - in_cnt[pick_l]);
            taps      <= 8'(taps_c);
          end else if (room[0] && aq_ready) begin
            seq <= Q_LOAD0;
          end else if (pick_fmt && export_cnt == 0) begin
            cur      <= pick_fl;
            seq      <= Q_FORMAT;
            req      <= REQ_FORMAT;
            req_slot <= pick_fl;
            req_last <= last[pick_fl];
          end else if (all_fmt && export_cnt == 0) begin
            // FINISH: next bin; the scan chain now holds this bin's features.
            formatted      <= '0;
            term_formatted <= 1'b0;
            export_cnt     <= CNT_W'(n_ch_en) * (CNT_W'(cfg_layers) + 1'b1);
            for (int l = 0; l < CONV_LAYERS; l++) begin
              in_cnt[l]  <= '0;
              out_cnt[l] <= '0;
              win_end[l] <= CNT_W'(cfg_layer[l].s);
              wptr[l]    <= '0;
            end
          end
        end
        Q_LOAD0: begin
          in_cnt[0] <= in_cnt[0] + 1'b1;
          wptr[0]   <= (wptr[0] == cfg_layer[0].k - 1'b1) ? '0 : wptr[0] + 1'b1;
          seq       <= Q_DECIDE;
        end
        Q_CONV: begin
          if (pe_done) begin
            seq      <= Q_UPDATE;
            req      <= REQ_UPDATE;
          end
        end
        Q_UPDATE: begin
          if (pe_done) begin
            out_cnt[cur] <= out_cnt[cur] + 1'b1;
            win_end[cur] <= win_end[cur] + CNT_W'(cfg_layer[cur].s);
            seq <= last[cur] ? Q_DECIDE : Q_LOADN;
          end
        end
        Q_LOADN: begin
          in_cnt[cur+1] <= in_cnt[cur+1] + 1'b1;
          wptr[cur+1]   <= (wptr[cur+1] == cfg_layer[cur+1].k - 1'b1) ? '0 : wptr[cur+1] + 1'b1;
          seq           <= Q_DECIDE;
        end
        Q_FORMAT: begin
          if (pe_done) begin
            formatted[cur] <= 1'b1;
            if (last[cur]) begin
              seq      <= Q_FORMAT_T;
              req      <= REQ_FORMAT;
              req_slot <= 3'(TERM_SLOT);
            end else begin
              seq <= Q_DECIDE;
            end
          end
        end
        Q_FORMAT_T: begin
          if (pe_done) begin
            term_formatted <= 1'b1;
            seq <= Q_DECIDE;
          end
        end
        default: seq <= Q_DECIDE;
      endcase
    end
  end

  // Memory writes for the two kinds of load.
  assign aq_pop     = run && (seq == Q_LOAD0);
  assign ld_we      = run && (seq == Q_LOAD0 || seq == Q_LOADN);
  assign ld_from_pe = (seq == Q_LOADN);
  assign ld_addr    = (seq == Q_LOADN) ? base[cur+1][SADDR_W-1:0] + wptr[cur+1]
                                       : base[0][SADDR_W-1:0] + wptr[0];

  assign feat_shift = run && (export_cnt != 0) && !fq_full;

  // Visible per-layer state.
  always_comb begin
    for (int l = 0; l < CONV_LAYERS; l++) begin
      if (!active[l] || !run)                            layer_state[l] = L_IDLE;
      else if (formatted[l])                             layer_state[l] = L_FINISH;
      else if (seq == Q_FORMAT && cur == 3'(l))          layer_state[l] = L_WAIT_FORMAT;
      else if (seq == Q_CONV && cur == 3'(l))            layer_state[l] = L_CONVOLVE;
      else if (seq == Q_UPDATE && cur == 3'(l))          layer_state[l] = L_UPDATE;
      else if (seq == Q_LOADN && cur == 3'(l))           layer_state[l] = L_WAIT_RESULT;
      else if ((seq == Q_LOADN && cur + 1 == 3'(l)) || (seq == Q_LOAD0 && l == 0))
                                                         layer_state[l] = L_LOAD;
      else if (done_l[l])                                layer_state[l] = L_WAIT_FORMAT;
      else if (conv_ready[l])                            layer_state[l] = L_WAIT_MULT;
      else                                               layer_state[l] = L_IDLE;
    end
  end

  assign ev_wait_mult    = run && seq == Q_DECIDE && pick_conv && |(conv_ready & ~(CONV_LAYERS'(1) << pick_l));
  assign ev_conv_startup = run && seq == Q_DECIDE && pick_conv && (win_end[pick_l] < CNT_W'(cfg_layer[pick_l].k));
  assign ev_conv_padding = run && seq == Q_DECIDE && pick_conv && (win_end[pick_l] > n_in[pick_l]);
  assign ev_format_wait  = run && seq == Q_DECIDE && !pick_conv && !(room[0] && aq_ready)
                           && pick_fmt && export_cnt != 0;
  assign ev_bin_done     = run && seq == Q_DECIDE && !pick_conv && !(room[0] && aq_ready)
                           && !pick_fmt && all_fmt && export_cnt == 0;

  // The sequencer never starts a convolution whose result has nowhere to go.
  assert property (@(posedge clk) disable iff (!rst_n || !run)
                   (seq == Q_DECIDE && pick_conv) |-> taps_c != 0);
endmodule
