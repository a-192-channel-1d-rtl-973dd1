// tb_weight_sram: writes traversal and feature weights to every entry, then
// reads them back in random order and checks both outputs (one cycle of
// latency) and that the two halves are independent: half of the traversal
// words are rewritten afterwards without touching the feature words.
`timescale 1ns/1ps
module tb_weight_sram;
  logic clk = 0, we = 0, wsel = 0, re = 0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [8:0] wdata = '0, wt_trav, wt_feat;
  logic [8:0] mt [256], mf [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  weight_sram dut (.*);

  initial begin
    for (int a = 0; a < 256; a++)
      for (int s = 0; s < 2; s++) begin
        @(negedge clk); we = 1; wsel = s[0]; waddr = 8'(a); wdata = 9'($urandom);
        if (s == 0) mt[a] = wdata; else mf[a] = wdata;
      end
    // Rewrite half of the traversal words only: the feature words must keep
    // their values.
    for (int a = 0; a < 256; a += 2) begin
      @(negedge clk); we = 1; wsel = 1'b0; waddr = 8'(a); wdata = 9'($urandom);
      mt[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk); re = 1; raddr = 8'($urandom);
      @(posedge clk); #1;
      checks += 2;
      if (wt_trav !== mt[raddr]) begin failures++; $display("FAIL: trav %0d", raddr); end
      if (wt_feat !== mf[raddr]) begin failures++; $display("FAIL: feat %0d", raddr); end
    end
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
