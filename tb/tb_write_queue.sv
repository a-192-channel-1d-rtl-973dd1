// tb_write_queue: configuration and weight writes pushed on the interface
// clock must come out, in order and decoded to the right port, on the
// system clock; pushes while full are refused.
`timescale 1ns/1ps
module tb_write_queue;
  logic iclk = 0, irst_n = 1, clk = 0, rst_n = 1;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {irst_n, rst_n} = '0;
  logic push = 0, is_weight = 0, full;
  logic [7:0] addr = '0;
  logic [15:0] data = '0;
  logic cfg_we, wt_we, wt_sel;
  logic [7:0] cfg_addr, wt_addr;
  logic [15:0] cfg_data;
  logic [8:0] wt_data;
  logic [24:0] sb[$];
  int checks = 0, failures = 0, n_full = 0;

  always #3 iclk = ~iclk;
  always #5 clk = ~clk;
  write_queue dut (.*);

  always @(posedge clk) if (rst_n && (cfg_we || wt_we)) begin
    logic [24:0] e;
    checks++;
    if (sb.size() == 0) begin failures++; $display("FAIL: spurious write"); end
    else begin
      e = sb.pop_front();
      if (cfg_we && wt_we) begin failures++; $display("FAIL: both ports"); end
      else if (cfg_we && (e[24] || cfg_addr != e[23:16] || cfg_data != e[15:0])) begin
        failures++; $display("FAIL: cfg %h/%h expected %h", cfg_addr, cfg_data, e);
      end else if (wt_we && (!e[24] || wt_addr != e[23:16] || wt_sel != e[9] || wt_data != e[8:0])) begin
        failures++; $display("FAIL: weight %h expected %h", {wt_addr, wt_sel, wt_data}, e);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    irst_n = 1; rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge iclk);
      push = ($urandom_range(3) != 0);
      is_weight = $urandom_range(1);
      addr = 8'($urandom);
      data = 16'($urandom);
      if (push && !full) sb.push_back({is_weight, addr, data});
      if (push && full) n_full++;
    end
    @(negedge iclk) push = 0;
    repeat (20) @(posedge clk);
    checks += 2;
    if (sb.size() != 0) begin failures++; $display("FAIL: %0d writes lost", sb.size()); end
    if (n_full == 0) begin failures++; $display("FAIL: queue never filled"); end
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
