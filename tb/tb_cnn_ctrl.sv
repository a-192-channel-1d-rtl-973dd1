// tb_cnn_ctrl: runs the algorithm control FSM alone, with a behavioural
// responder in place of the PE control FSM and randomly available input
// samples and export space, for the three published model shapes on
// 150-sample bins (kernels 36/14/16 stride 2; 10/5 stride 3; six layers of
// 40 stride 2), two bins each.
// Every convolution request is checked against the window it must cover:
// for output i of layer l, taps = (newest index) - (oldest index) + 1,
// weight start = base_l + first tap index, activation start = base_l +
// (newest index mod K_l). Per bin it checks the published operation counts
// (SRAM writes, pooling operations, non-padding MACs: 327/210/7520,
// 222/91/1176 and 489/379/17960), the number of feature words exported,
// and that a convolution never runs while the layer above has no room.
`timescale 1ns/1ps
module tb_cnn_ctrl;
  import fenet_pkg::*;
  localparam int NCH = 5;
  logic clk = 0, rst_n = 1, run = 0;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {rst_n} = '0;
  logic [2:0] cfg_layers = 3'd1;
  logic [BIN_W-1:0] cfg_bin_strides = '0;
  layer_cfg_t cfg_layer [MAX_LAYERS];
  logic [$clog2(NCH+1)-1:0] n_ch_en = 3'd5;
  logic aq_ready = 0, aq_pop, ld_we, ld_from_pe;
  logic [7:0] ld_addr;
  pe_req_e req;
  logic [2:0] req_slot;
  logic req_last;
  logic [7:0] act_start, part_base, part_k, wt_start, taps;
  logic pe_done = 0, fq_full = 0, feat_shift;
  layer_state_e layer_state [CONV_LAYERS];
  logic ev_wait_mult, ev_conv_startup, ev_conv_padding, ev_format_wait, ev_bin_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cnn_ctrl #(.NCH(NCH)) dut (.*);

  // Behavioural PE control: done a few cycles after each request.
  int busy_cnt = 0;
  always @(posedge clk) begin
    pe_done <= 1'b0;
    if (req != REQ_NONE) busy_cnt <= (req == REQ_CONVOLVE) ? int'(taps) + 2 : 3;
    else if (busy_cnt == 1) begin pe_done <= 1'b1; busy_cnt <= 0; end
    else if (busy_cnt > 1) busy_cnt <= busy_cnt - 1;
  end
  always @(negedge clk) begin
    aq_ready = ($urandom_range(3) != 0);
    fq_full  = ($urandom_range(4) == 0);
  end

  int L, K[7], S[7], N[8], base[8];
  int oi[7];
  int n_loads, n_convs, n_taps, n_shift, n_bins;

  always @(posedge clk) if (run) begin
    n_loads += int'(ld_we);
    n_shift += int'(feat_shift);
    n_bins  += int'(ev_bin_done);
    if (req == REQ_CONVOLVE) begin
      int l, i, p, hi, lo, newest;
      l = int'(req_slot); i = oi[l];
      p = S[l] * (i + 1) - 1;
      hi = (p < N[l] - 1) ? p : N[l] - 1;
      lo = (p - K[l] + 1 > 0) ? p - K[l] + 1 : 0;
      newest = hi;
      checks++;
      if (int'(taps) != hi - lo + 1 || int'(wt_start) != base[l] + (p - hi) ||
          int'(act_start) != base[l] + (newest % K[l]) || int'(part_base) != base[l] ||
          int'(part_k) != K[l] || req_last != (l == L - 1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: layer %0d output %0d: taps %0d/%0d wt %0d/%0d act %0d/%0d", l, i,
                   taps, hi - lo + 1, wt_start, base[l] + (p - hi), act_start, base[l] + (newest % K[l]));
      end
      oi[l]++;
      n_convs++;
      n_taps += int'(taps);
    end
  end

  task automatic run_model(input int layers, input int k0[7], input int s0[7], input int bstr,
                           input int exp_wr, input int exp_pool, input int exp_np);
    L = layers;
    for (int l = 0; l < 7; l++) begin K[l] = k0[l]; S[l] = s0[l]; end
    N[0] = S[0] * bstr; base[0] = 0;
    for (int l = 0; l < L; l++) begin
      N[l+1] = (N[l] + K[l] - 1) / S[l];
      base[l+1] = base[l] + K[l];
    end
    for (int l = 0; l < 8; l++)
      cfg_layer[l] = '{k: 8'(l < 7 ? K[l] : 1), s: 4'(l < 7 ? S[l] : 1), leak: 3'd0, div: 5'd0};
    cfg_layers = 3'(L);
    cfg_bin_strides = BIN_W'(bstr);
    @(negedge clk) run = 0;
    @(negedge clk) run = 1;
    for (int bin = 0; bin < 2; bin++) begin
      int wr, pools;
      foreach (oi[l]) oi[l] = 0;
      n_loads = 0; n_convs = 0; n_taps = 0; n_shift = 0;
      n_bins = 0;
      while (n_bins == 0) @(posedge clk);
      // Published counts: SRAM writes include the final traversal outputs,
      // which this design pools instead of storing.
      wr = n_loads + N[L];
      pools = n_convs + N[L];
      checks += 3;
      if (wr != exp_wr)       begin failures++; $display("FAIL: SRAM writes %0d expected %0d", wr, exp_wr); end
      if (pools != exp_pool)  begin failures++; $display("FAIL: pooling ops %0d expected %0d", pools, exp_pool); end
      if (2 * n_taps != exp_np) begin failures++; $display("FAIL: NP-MACs %0d expected %0d", 2 * n_taps, exp_np); end
      if (bin == 1) begin
        checks++;   // features of bin 0 were exported during bin 1
        if (n_shift != NCH * (L + 1)) begin failures++; $display("FAIL: %0d feature shifts", n_shift); end
      end
      $display("model %0d layers bin %0d: writes %0d pools %0d NP-MACs %0d", L, bin, wr, pools, 2 * n_taps);
    end
  endtask

  // The higher layer must have room whenever a convolution starts.
  always @(posedge clk) if (run && req == REQ_CONVOLVE && !req_last) begin
    int l;
    l = int'(req_slot);
    checks++;
    if (!(dut.in_cnt[l+1] < dut.win_end[l+1])) begin failures++; $display("FAIL: no room above layer %0d", l); end
  end

  int wm = 0, su = 0, pd = 0;
  always @(posedge clk) begin wm += int'(ev_wait_mult); su += int'(ev_conv_startup); pd += int'(ev_conv_padding); end

  initial begin
    for (int l = 0; l < 8; l++) cfg_layer[l] = '{k: 8'd1, s: 4'd1, leak: 3'd0, div: 5'd0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_model(3, '{36, 14, 16, 1, 1, 1, 1}, '{2, 2, 2, 1, 1, 1, 1}, 75, 327, 210, 7520);
    run_model(2, '{10, 5, 1, 1, 1, 1, 1},   '{3, 3, 1, 1, 1, 1, 1}, 50, 222, 91, 1176);
    run_model(6, '{40, 40, 40, 40, 40, 40, 1}, '{2, 2, 2, 2, 2, 2, 1}, 75, 489, 379, 17960);
    checks++;
    if (wm == 0 || su == 0 || pd == 0) begin failures++; $display("FAIL: events %0d %0d %0d", wm, su, pd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
