// tb_fenet_full: the feature extractor at its full size (6 streets x
// 4 blocks x 8 channels = 192 channels, every parameter at its default),
// taken through one complete bin of the 3-layer model with kernels 36/14/16,
// stride 2 and 150-sample bins.
//
// The host writes the configuration and all weights over the serial port,
// streams 150 random samples to each of the 192 channels (retrying any frame
// the status reports as dropped), reads the 4 features of every channel and
// compares all 768 with the integer reference model. It also checks the
// per-bin SRAM loads, convolutions and multiplied taps against the reference
// schedule (the published 327 SRAM writes and 7520 non-padding MACs per
// channel and bin) and that exactly one bin completed.
`timescale 1ns/1ps
module tb_fenet_full;
  import fenet_pkg::*;
  import tb_fenet_ref_pkg::*;

  localparam int NS = 6, NB = 4, NP = 8;
  localparam int NCH = NS * NB * NP;

  logic clk = 0, iclk = 0, rst_n = 1, irst_n = 1;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {rst_n, irst_n} = '0;
  logic cs_n = 1, mosi = 0;
  logic miso, stall;
  layer_state_e layer_state [CONV_LAYERS];
  logic ev_wait_mult, ev_conv_startup, ev_conv_padding, ev_format_wait, ev_bin_done;

  always #5 clk = ~clk;
  always #3 iclk = ~iclk;

  fenet_top dut (
    .clk, .rst_n, .iclk, .irst_n, .cs_n, .mosi, .miso, .stall,
    .layer_state, .ev_wait_mult, .ev_conv_startup, .ev_conv_padding, .ev_format_wait,
    .ev_bin_done
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_wait_mult = 0, n_startup = 0, n_padding = 0, n_fmt_wait = 0, n_bins = 0;
  int n_loads = 0, n_convs = 0, n_taps = 0, n_skip = 0, n_leak = 0;
  bit seen_wait_mult_state = 0;

  always @(posedge clk) if (rst_n) begin
    n_wait_mult += int'(ev_wait_mult);
    n_startup   += int'(ev_conv_startup);
    n_padding   += int'(ev_conv_padding);
    n_fmt_wait  += int'(ev_format_wait);
    n_bins      += int'(ev_bin_done);
    n_loads     += int'(dut.u_cnn.ld_we);
    if (dut.u_cnn.req == REQ_CONVOLVE) begin
      n_convs++;
      n_taps += int'(dut.u_cnn.taps);
    end
    foreach (layer_state[l]) if (layer_state[l] == L_WAIT_MULT) seen_wait_mult_state = 1;
  end

  // ---------------- host side of the serial port ----------------
  int got[$];
  bit reading;

  task automatic frame(input logic [31:0] w, output logic [31:0] s);
    @(negedge iclk) cs_n = 1;
    @(negedge iclk) cs_n = 0;
    for (int i = 31; i >= 0; i--) begin
      mosi = w[i];
      s[i] = miso;
      if (i != 0) @(negedge iclk);
    end
    @(negedge iclk) cs_n = 1;
  endtask

  // Send a frame and a follow-up (READ or no-op) frame; returns the
  // follow-up's status and stores a feature it delivered.
  task automatic send_checked(input logic [31:0] w, output bit dropped);
    logic [31:0] s;
    frame(w, s);
    frame(reading ? {4'd4, 28'd0} : 32'd0, s);
    if (reading && s[31]) got.push_back(sm2i(s[8:0]));
    dropped = s[29];
  endtask

  task automatic cfg(input int a, input int d);
    bit dr;
    do send_checked({4'd1, 8'(a), 4'd0, 16'(d)}, dr); while (dr);
  endtask

  task automatic wload(input int a, input int sel, input int v);
    bit dr;
    do send_checked({4'd2, 8'(a), 4'd0, 6'd0, 1'(sel), i2sm(v)}, dr); while (dr);
  endtask

  task automatic sample(input int ch, input int v);
    bit dr;
    do begin
      send_checked({4'd3, 8'(ch), 4'd0, 7'd0, i2sm(v)}, dr);
      if (dr) n_stall++;
    end while (dr);
  endtask

  task automatic drain(input int want);
    logic [31:0] s;
    int guard = 0;
    while (got.size() < want && guard < 20000) begin
      frame({4'd4, 28'd0}, s);
      if (s[31]) got.push_back(sm2i(s[8:0]));
      guard++;
    end
  endtask

  // ---------------- model configuration ----------------
  int layers, bstr;
  int k[8], s_[8], lk[8], dv[8];
  int wt[8][256], wf[8][256];
  bit en[NCH];

  task automatic program_model();
    int base;
    cfg(8'h00, 0);
    cfg(8'h01, layers);
    cfg(8'h02, bstr);
    for (int l = 0; l < 8; l++) begin
      cfg(8'h10 + 2*l, (s_[l] << 8) | k[l]);
      cfg(8'h11 + 2*l, (dv[l] << 8) | lk[l]);
    end
    // channel enables, 16 channels per register
    for (int g = 0; g < (NCH + 15) / 16; g++) begin
      int m;
      m = 0;
      for (int c = 16 * g; c < NCH && c < 16 * g + 16; c++) if (en[c]) m |= (1 << (c - 16 * g));
      cfg(8'h40 + g, m);
    end
    base = 0;
    for (int l = 0; l < layers; l++) begin
      for (int j = 0; j < k[l]; j++) begin
        wload(base + j, 0, wt[l][j]);
        wload(base + j, 1, wf[l][j]);
      end
      base += k[l];
    end
    cfg(8'h00, 1);
  endtask

  function automatic int rnd_sym(input int m);
    return int'($urandom_range(2*m)) - m;
  endfunction

  // Run nbins bins; reads features only in the bins flagged in rd_mask.
  task automatic run_bins(input int nbins, input int rd_mask);
    iq_t x [NCH];
    iq_t exp_f;
    int expect_q[$];
    int b = s_[0] * bstr;
    int wr, pl, mc, np;
    int loads0, convs0, taps0;
    counts(b, layers, k, s_, wr, pl, mc, np);
    got = {};
    loads0 = n_loads; convs0 = n_convs; taps0 = n_taps;
    for (int bin = 0; bin < nbins; bin++) begin
      for (int c = 0; c < NCH; c++) begin
        x[c] = {};
        for (int t = 0; t < b; t++) begin
          int v = rnd_sym(90);
          if ($urandom_range(20) == 0) v = rnd_sym(255);   // occasional spike
          x[c].push_back(v);
        end
      end
      reading = rd_mask[bin];
      for (int t = 0; t < b; t++)
        for (int c = 0; c < NCH; c++)
          if (en[c]) sample(c, x[c][t]);
      for (int c = 0; c < NCH; c++)
        if (en[c]) begin
          exp_f = run_bin(x[c], layers, k, s_, lk, dv, wt, wf);
          foreach (exp_f[i]) expect_q.push_back(exp_f[i]);
        end
    end
    // Let the bin finish its padding steps before the final read-out.
    repeat (4000) @(posedge clk);
    reading = 1;
    drain(expect_q.size());
    checks++;
    if (got.size() != expect_q.size()) begin
      failures++;
      $display("FAIL: %0d features read, %0d expected", got.size(), expect_q.size());
    end
    foreach (expect_q[i]) begin
      checks++;
      if (i >= got.size() || got[i] != expect_q[i]) begin
        failures++;
        if (failures < 20)
          $display("FAIL: feature %0d got %0d expected %0d", i,
                   (i < got.size()) ? got[i] : -9999, expect_q[i]);
      end
    end
    // Schedule counts per bin against the reference schedule.
    checks += 3;
    // The last layer's traversal result goes to its pooling register, not to SRAM.
    if (n_loads - loads0 != nbins * (wr - (pl - (wr - b)))) begin
      failures++; $display("FAIL: SRAM loads %0d, expected %0d", n_loads - loads0, nbins * (wr - (pl - (wr - b))));
    end
    if (n_convs - convs0 != nbins * (wr - b)) begin
      failures++; $display("FAIL: convolutions %0d, expected %0d", n_convs - convs0, nbins * (wr - b));
    end
    if (2 * (n_taps - taps0) != nbins * np) begin
      failures++; $display("FAIL: MAC taps x2 %0d, expected %0d", 2 * (n_taps - taps0), nbins * np);
    end
    $display("bins=%0d: SRAM writes/bin %0d, pooling ops/bin %0d, MACs/bin %0d, NP-MACs/bin %0d",
             nbins, wr, pl, mc, np);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1; irst_n = 1;
    repeat (4) @(posedge clk);

    // Phase A: 3 layers, kernels 36/14/16, stride 2, bins of 150.
    layers = 3; bstr = 75;
    k  = '{36, 14, 16, 1, 1, 1, 1, 1};
    s_ = '{2, 2, 2, 1, 1, 1, 1, 1};
    lk = '{0, 0, 0, 0, 0, 0, 0, 0};
    dv = '{7, 6, 5, 0, 0, 0, 0, 5};
    for (int l = 0; l < 8; l++) for (int j = 0; j < 256; j++) begin
      wt[l][j] = rnd_sym(70);
      wf[l][j] = rnd_sym(70);
    end
    foreach (en[c]) en[c] = 1;
    program_model();
    n_clamps = 0;
    run_bins(1, 'b1);
    begin
      int wr, pl, mc, np;
      counts(150, 3, k, s_, wr, pl, mc, np);
      checks += 4;
      if (wr != 327)  begin failures++; $display("FAIL: reference SRAM writes %0d", wr); end
      if (pl != 210)  begin failures++; $display("FAIL: reference pooling ops %0d", pl); end
      if (mc != 9136) begin failures++; $display("FAIL: reference MACs %0d", mc); end
      if (np != 7520) begin failures++; $display("FAIL: reference NP-MACs %0d", np); end
    end

    checks++;
    if (n_bins != 1) begin failures++; $display("FAIL: %0d bins completed", n_bins); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
