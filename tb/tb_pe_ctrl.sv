// tb_pe_ctrl: issues convolve, update and format requests and checks the
// broadcast micro-operation sequence cycle by cycle: CLR, then one MAC per
// tap arriving one cycle after its read, activation addresses stepping
// backwards with wrap-around inside the partition, weight addresses stepping
// forwards, LRELU -> ADD_POOL for an update, DIV -> ROUND -> RESTORE for a
// format, and the done pulse. Also checks the cycle count of a convolution
// (taps + 3 cycles from request to done).
`timescale 1ns/1ps
module tb_pe_ctrl;
  import fenet_pkg::*;
  logic clk = 0, rst_n = 1;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {rst_n} = '0;
  pe_req_e req = REQ_NONE;
  logic [2:0] req_slot = '0;
  logic req_last = 0;
  logic [7:0] act_start = '0, part_base = '0, part_k = '0, wt_start = '0, taps = '0;
  logic busy, done, sram_re, wt_re, op_last;
  logic [7:0] sram_addr, wt_addr;
  pe_op_e op;
  logic [2:0] op_slot;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pe_ctrl dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic convolve(input int base, input int k, input int start, input int ws, input int n);
    int a, w, cyc, macs, reads;
    int exp_a[$], exp_w[$];
    @(negedge clk);
    req = REQ_CONVOLVE; req_slot = 3'd2; part_base = 8'(base); part_k = 8'(k);
    act_start = 8'(start); wt_start = 8'(ws); taps = 8'(n);
    @(negedge clk); req = REQ_NONE;
    chk(op == PE_CLR && busy, "CLR first");
    a = start; w = ws;
    for (int i = 0; i < n; i++) begin
      exp_a.push_back(a); exp_w.push_back(w);
      a = (a == base) ? base + k - 1 : a - 1;
      w++;
    end
    cyc = 1; macs = 0; reads = 0;
    while (!done && cyc < 400) begin
      if (op == PE_MAC) macs++;
      if (sram_re) begin
        chk(wt_re, "weight read with activation read");
        chk(int'(sram_addr) == exp_a[reads] && int'(wt_addr) == exp_w[reads],
            $sformatf("tap %0d address %0d/%0d expected %0d/%0d", reads, sram_addr, wt_addr, exp_a[reads], exp_w[reads]));
        reads++;
      end
      @(negedge clk); cyc++;
    end
    chk(reads == n && macs == n, $sformatf("taps %0d reads %0d macs %0d", n, reads, macs));
    chk(cyc == n + 3, $sformatf("convolution of %0d taps took %0d cycles", n, cyc));
    @(negedge clk);
    chk(!busy, "idle after done");
  endtask

  task automatic seq3(input pe_req_e r, input pe_op_e o1, input pe_op_e o2, input pe_op_e o3, input int slot);
    @(negedge clk); req = r; req_slot = 3'(slot); req_last = 1;
    @(negedge clk); req = REQ_NONE;
    chk(op == o1 && op_slot == 3'(slot) && op_last, "first op");
    @(negedge clk); chk(op == o2, "second op");
    if (o3 != PE_NOP) begin @(negedge clk); chk(op == o3, "third op"); end
    @(negedge clk); chk(op == PE_NOP && !done, "end of ops");
    while (!done) @(negedge clk);
    @(negedge clk);
    req_last = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    convolve(10, 36, 12, 40, 36);     // wraps from 10 to 45
    convolve(0, 14, 13, 36, 1);
    convolve(100, 16, 100, 50, 9);
    seq3(REQ_UPDATE, PE_LRELU, PE_ADD_POOL, PE_NOP, 1);
    seq3(REQ_FORMAT, PE_DIV_POOL, PE_ROUND, PE_RESTORE, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
