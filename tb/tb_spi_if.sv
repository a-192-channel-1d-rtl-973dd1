// tb_spi_if: drives serial frames and checks the decoded configuration and
// weight writes, the one-hot channel queue write with its data, the dropped
// flag when the addressed queue or the write queue is full, the stall
// output, and the status word / feature pop of READ frames.
`timescale 1ns/1ps
module tb_spi_if;
  localparam int NCH = 8;
  logic iclk = 0, irst_n = 1, cs_n = 1, mosi = 0, miso, stall;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {irst_n} = '0;
  logic wq_push, wq_is_weight, wq_full = 0;
  logic [7:0] wq_addr;
  logic [15:0] wq_data;
  logic [8:0] aq_wdata;
  logic [NCH-1:0] aq_wen, aq_full = '0;
  logic [8:0] fq_rdata = 9'h1A5;
  logic fq_empty = 0, fq_pop;
  int checks = 0, failures = 0;
  int n_wq = 0, n_aq = 0, n_pop = 0;
  logic [31:0] last_wq, last_aq;

  always #4 iclk = ~iclk;
  spi_if #(.NCH(NCH)) dut (.*);

  always @(posedge iclk) begin
    if (wq_push) begin n_wq++; last_wq = {wq_is_weight, 7'd0, wq_addr, wq_data}; end
    if (|aq_wen) begin n_aq++; last_aq = {aq_wen, 15'd0, aq_wdata}; end
    if (fq_pop) n_pop++;
  end

  task automatic frame(input logic [31:0] w, output logic [31:0] s);
    @(negedge iclk) cs_n = 1;
    @(negedge iclk) cs_n = 0;
    for (int i = 31; i >= 0; i--) begin
      mosi = w[i];
      s[i] = miso;
      if (i != 0) @(negedge iclk);
    end
    @(negedge iclk) cs_n = 1;
    @(negedge iclk);
  endtask

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] s;
    repeat (2) @(posedge iclk);
    irst_n = 1;
    frame({4'd1, 8'h12, 4'd0, 16'hBEEF}, s);
    chk(n_wq == 1 && last_wq == {1'b0, 7'd0, 8'h12, 16'hBEEF}, "config write");
    frame({4'd2, 8'h34, 4'd0, 16'h0255}, s);
    chk(n_wq == 2 && last_wq == {1'b1, 7'd0, 8'h34, 16'h0255}, "weight write");
    frame({4'd3, 8'd5, 4'd0, 16'h0123}, s);
    chk(n_aq == 1 && last_aq == {8'b0010_0000, 15'd0, 9'h123}, "sample to channel 5");
    // Full queue: dropped, flagged in the next status, stall raised.
    aq_full[5] = 1;
    frame({4'd3, 8'd5, 4'd0, 16'h0042}, s);
    chk(n_aq == 1, "no write to a full queue");
    chk(stall, "stall output");
    frame(32'd0, s);
    chk(s[29] && s[30], "dropped and stall in status");
    aq_full[5] = 0;
    frame({4'd3, 8'd5, 4'd0, 16'h0042}, s);
    chk(n_aq == 2 && last_aq[8:0] == 9'h042, "retry accepted");
    frame(32'd0, s);
    chk(!s[29], "dropped cleared");
    wq_full = 1;
    frame({4'd1, 8'h01, 4'd0, 16'h0001}, s);
    chk(n_wq == 2, "no push when the write queue is full");
    wq_full = 0;
    // READ: status shows the head feature, then it is popped.
    frame({4'd4, 28'd0}, s);
    chk(s[31] && s[8:0] == 9'h1A5, "feature in status");
    chk(n_pop == 1, "feature popped");
    fq_empty = 1;
    frame({4'd4, 28'd0}, s);
    chk(!s[31] && n_pop == 1, "no pop when empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
