// tb_pe: drives one processing element with the micro-operation sequence of
// a small 2-layer computation: several convolutions per layer (random taps,
// activations and weights), update steps, then formatting of slots 0, 1 and
// the terminal slot 7. Checks the intermediate feature register after every
// update, the three features read through the scan chain (skipping unused
// slots), the pass-through of chain_in, and that a powered-down channel is
// skipped entirely.
`timescale 1ns/1ps
module tb_pe;
  import fenet_pkg::*;
  import tb_fenet_ref_pkg::*;
  logic clk = 0, rst_n = 1, ch_en = 1, op_last = 0, shift = 0;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {rst_n} = '0;
  logic [MAX_LAYERS-1:0] slot_en = 8'b1000_0011;
  pe_op_e op = PE_NOP;
  logic [2:0] op_slot = '0, leak = '0, leak_term = '0;
  logic [4:0] div = '0;
  sm9_t wt_trav = '0, wt_feat = '0, act = '0, inter, chain_in = 9'h0AA, chain_out;
  int checks = 0, failures = 0;
  int pool[8];
  int lk[2] = '{0, 2}, dvs[8] = '{4, 3, 0, 0, 0, 0, 0, 2};

  always #5 clk = ~clk;
  pe dut (.*);

  task automatic step(input pe_op_e o);
    op = o;
    @(negedge clk);
    op = PE_NOP;
  endtask

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (pool[i]) pool[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    leak_term = 3'd1;
    for (int l = 0; l < 2; l++) begin
      op_slot = 3'(l); leak = 3'(lk[l]); op_last = (l == 1);
      for (int o = 0; o < 12; o++) begin
        int at, af, n;
        at = 0; af = 0;
        n = $urandom_range(1, 20);
        step(PE_CLR);
        for (int i = 0; i < n; i++) begin
          int a, w1, w2;
          a  = int'($urandom_range(300)) - 150;
          w1 = int'($urandom_range(300)) - 150;
          w2 = int'($urandom_range(300)) - 150;
          act = i2sm(a); wt_trav = i2sm(w1); wt_feat = i2sm(w2);
          step(PE_MAC);
          at = clamp16(at + mul(a, w1));
          af = clamp16(af + mul(a, w2));
        end
        step(PE_LRELU);
        chk(sm2i(inter) == rnd_act(at), $sformatf("intermediate l%0d o%0d: %0d vs %0d", l, o, sm2i(inter), rnd_act(at)));
        step(PE_ADD_POOL);
        pool[l] += rnd_act(leaky(af, lk[l]));
        if (l == 1) pool[7] += rnd_act(leaky(at, 1));
      end
    end
    op_last = 0;
    foreach (dvs[s]) if (s < 2 || s == 7) begin
      op_slot = 3'(s); div = 5'(dvs[s]);
      step(PE_DIV_POOL); step(PE_ROUND); step(PE_RESTORE);
    end
    // Scan chain: slot 0, slot 1, slot 7, then chain_in.
    begin
      int exp_f[3];
      exp_f[0] = fmt(pool[0], dvs[0]); exp_f[1] = fmt(pool[1], dvs[1]); exp_f[2] = fmt(pool[7], dvs[7]);
      for (int i = 0; i < 3; i++) begin
        chk(sm2i(chain_out) == exp_f[i], $sformatf("feature %0d: %0d vs %0d", i, sm2i(chain_out), exp_f[i]));
        shift = 1; @(negedge clk); shift = 0;
      end
      chk(chain_out == 9'h0AA, "chain_in reaches chain_out after the live slots");
    end
    // Pools were cleared by RESTORE: a new format gives zero.
    op_slot = 0; div = 0;
    step(PE_DIV_POOL); step(PE_ROUND);
    chk(chain_out == 9'h000, "pool cleared");
    ch_en = 0;
    #1 chk(chain_out == chain_in, "powered-down channel skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
