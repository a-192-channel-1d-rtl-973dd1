// tb_mac_datapath: random convolutions (clear, a random number of MAC steps,
// optional rectify) compared step by step with the integer reference model:
// products truncated to the accumulator's fraction, clamping at the 16-bit
// limits, the shift-based leaky ReLU and the rounding to a 9-bit word.
`timescale 1ns/1ps
module tb_mac_datapath;
  import fenet_pkg::*;
  import tb_fenet_ref_pkg::*;
  logic clk = 0, rst_n = 1, en = 1, clr = 0, mac = 0, rectify = 0;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {rst_n} = '0;
  logic [2:0] leak = '0;
  sm9_t act = '0, wt = '0;
  acc_t acc;
  sm9_t q;
  int checks = 0, failures = 0, model = 0;

  always #5 clk = ~clk;
  mac_datapath dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    n_clamps = 0;
    for (int t = 0; t < 300; t++) begin
      int n, big;
      n = $urandom_range(1, 40);
      big = (t % 5 == 0);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0; model = 0;
      for (int i = 0; i < n; i++) begin
        int a, w;
        // every fifth convolution uses large same-signed products to reach the clamp
        a = big ? int'($urandom_range(200, 255)) : int'($urandom_range(200)) - 100;
        w = big ? ((t % 10 == 0) ? 1 : -1) * int'($urandom_range(200, 255)) : int'($urandom_range(200)) - 100;
        act = i2sm(a); wt = i2sm(w); mac = 1;
        @(negedge clk);
        mac = 0;
        model = clamp16(model + mul(a, w));
        checks++;
        if (int'(acc) != model) begin failures++; $display("FAIL: acc %0d model %0d", acc, model); end
      end
      checks++;
      if (sm2i(q) != rnd_act(model)) begin failures++; $display("FAIL: q %0d model %0d", sm2i(q), rnd_act(model)); end
      leak = 3'($urandom_range(7));
      en = (t % 7 != 3);          // a powered-down channel must hold
      rectify = 1;
      @(negedge clk);
      rectify = 0;
      if (en) model = leaky(model, leak);
      en = 1;
      checks++;
      if (int'(acc) != model) begin failures++; $display("FAIL: lrelu %0d model %0d", acc, model); end
    end
    checks++;
    if (n_clamps == 0) begin failures++; $display("FAIL: clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
