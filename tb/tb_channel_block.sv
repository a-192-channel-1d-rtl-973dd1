// tb_channel_block: one channel block of 4 channels with channel 1 powered
// down. Pushes samples into the per-channel queues from the interface clock
// and checks that the block reports ready only once every enabled channel has
// a sample, loads them row by row into the shared SRAM, runs one convolution
// with the micro-operation sequence, writes the intermediate results back
// into SRAM and reads them, then formats two slots and reads the scan chain:
// every value is compared with the integer reference model, and the
// powered-down channel must be skipped by the chain.
`timescale 1ns/1ps
module tb_channel_block;
  import fenet_pkg::*;
  import tb_fenet_ref_pkg::*;
  localparam int NCH = 4;
  localparam int K = 6;
  logic clk = 0, rst_n = 1, iclk = 0, irst_n = 1;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {rst_n, irst_n} = '0;
  logic [NCH-1:0] ch_en = '1;
  logic [MAX_LAYERS-1:0] slot_en = 8'b1000_0001;
  pe_op_e op = PE_NOP;
  logic [2:0] op_slot = '0, leak = '0, leak_term = '0;
  logic op_last = 1'b1;
  logic [4:0] div = '0;
  sm9_t wt_trav = '0, wt_feat = '0, aq_wdata = '0, chain_in = 9'h155, chain_out;
  logic sram_en = 0, sram_we = 0, ld_from_pe = 0, aq_pop = 0, aq_ready, shift = 0;
  logic [SADDR_W-1:0] sram_addr = '0;
  logic [NCH-1:0] aq_wen = '0, aq_full;
  int checks = 0, failures = 0;
  int x[NCH][K], at[NCH], af[NCH], inter_old[NCH];
  int w1[K], w2[K];

  always #5 clk = ~clk;
  always #7 iclk = ~iclk;
  channel_block #(.NPE(NCH), .AQ_DEPTH(4)) dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic push(input int c, input int v);
    @(negedge iclk);
    aq_wdata = i2sm(v); aq_wen = '0; aq_wen[c] = 1'b1;
    @(negedge iclk);
    aq_wen = '0;
  endtask

  task automatic step(input pe_op_e o);
    op = o;
    @(negedge clk);
    op = PE_NOP;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; irst_n = 1;
    // Channel 1 is powered down: its queue is ignored and its lane untouched.
    ch_en[1] = 1'b0;
    for (int j = 0; j < K; j++) begin
      w1[j] = int'($urandom_range(300)) - 150;
      w2[j] = int'($urandom_range(300)) - 150;
    end
    // ---- sample queues: ready only when every enabled channel has data ----
    for (int t = 0; t < K; t++) begin
      for (int c = 0; c < NCH; c++) begin
        x[c][t] = int'($urandom_range(400)) - 200;
        if (c != 1) begin
          repeat (8) @(posedge clk);
          chk(!aq_ready, $sformatf("queue not ready before channel %0d sample %0d", c, t));
          push(c, x[c][t]);
        end
      end
      repeat (8) @(posedge clk);
      @(negedge clk);
      chk(aq_ready, $sformatf("queues ready with sample %0d", t));
      // load the sample row into SRAM address t and pop the queues
      sram_en = 1; sram_we = 1; sram_addr = SADDR_W'(t); aq_pop = 1;
      @(negedge clk);
      sram_en = 0; sram_we = 0; aq_pop = 0;
    end
    @(negedge clk);
    chk(!aq_ready, "queues empty after the loads");
    // ---- one convolution over the K stored samples, newest first ----
    step(PE_CLR);
    foreach (at[c]) begin at[c] = 0; af[c] = 0; end
    for (int j = 0; j < K; j++) begin
      sram_en = 1; sram_addr = SADDR_W'(K - 1 - j);
      @(negedge clk);
      sram_en = 0;
      wt_trav = i2sm(w1[j]); wt_feat = i2sm(w2[j]);
      step(PE_MAC);
      for (int c = 0; c < NCH; c++) begin
        at[c] = clamp16(at[c] + mul(x[c][K-1-j], w1[j]));
        af[c] = clamp16(af[c] + mul(x[c][K-1-j], w2[j]));
      end
    end
    leak = 3'd1; leak_term = 3'd2;
    step(PE_LRELU);
    step(PE_ADD_POOL);
    // ---- the intermediate results go back into SRAM (address K) ----
    sram_en = 1; sram_we = 1; sram_addr = SADDR_W'(K); ld_from_pe = 1;
    @(negedge clk);
    sram_we = 0; ld_from_pe = 0;
    @(negedge clk);
    sram_en = 0;
    for (int c = 0; c < NCH; c++)
      if (c != 1)
        chk(sm2i(dut.dout[c*ACT_W +: ACT_W]) == rnd_act(at[c]),
            $sformatf("channel %0d intermediate %0d expected %0d", c, sm2i(dut.dout[c*ACT_W +: ACT_W]), rnd_act(at[c])));
    // ---- format slot 0 (feature) and slot 7 (terminal) ----
    op_slot = 3'd0; div = 5'd0;
    step(PE_DIV_POOL); step(PE_ROUND); step(PE_RESTORE);
    op_slot = 3'd7; div = 5'd1;
    step(PE_DIV_POOL); step(PE_ROUND); step(PE_RESTORE);
    // ---- scan chain: channel 0 slot 0, channel 0 slot 7, channel 2 ... ----
    for (int c = 0; c < NCH; c++) begin
      if (c == 1) continue;
      chk(sm2i(chain_out) == fmt(rnd_act(leaky(af[c], 1)), 0),
          $sformatf("channel %0d feature %0d expected %0d", c, sm2i(chain_out), fmt(rnd_act(leaky(af[c], 1)), 0)));
      shift = 1; @(negedge clk); shift = 0;
      chk(sm2i(chain_out) == fmt(rnd_act(leaky(at[c], 2)), 1),
          $sformatf("channel %0d terminal %0d expected %0d", c, sm2i(chain_out), fmt(rnd_act(leaky(at[c], 2)), 1)));
      shift = 1; @(negedge clk); shift = 0;
    end
    chk(chain_out == 9'h155, "chain input follows the last live feature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
