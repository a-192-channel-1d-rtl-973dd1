// tb_async_queue: random writes and reads on two unrelated clocks against a
// scoreboard queue. Checks data order, that exactly DEPTH writes fill the
// queue when nothing is read, and that writes while full are ignored.
`timescale 1ns/1ps
module tb_async_queue;
  localparam int W = 9, D = 4;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {wrst_n, rrst_n} = '0;
  logic wen = 0, ren = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic wfull, rempty;
  int checks = 0, failures = 0;
  logic [W-1:0] sb[$];

  always #3 wclk = ~wclk;
  always #7 rclk = ~rclk;

  async_queue #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (3) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    // Fill with no reads: DEPTH writes accepted, then full.
    for (int i = 0; i < D + 2; i++) begin
      @(negedge wclk);
      wen = 1; wdata = W'(100 + i);
      if (!wfull) sb.push_back(wdata);
    end
    @(negedge wclk) wen = 0;
    checks++;
    if (sb.size() != D || !wfull) begin failures++; $display("FAIL: fill %0d full=%0d", sb.size(), wfull); end
    // Random traffic.
    fork
      begin
        for (int i = 0; i < 400; i++) begin
          @(negedge wclk);
          wen = ($urandom_range(2) != 0);
          wdata = W'($urandom);
          if (wen && !wfull) sb.push_back(wdata);
        end
        @(negedge wclk) wen = 0;
      end
      begin
        for (int i = 0; i < 400; i++) begin
          @(negedge rclk);
          ren = ($urandom_range(1) != 0);
          if (ren && !rempty) begin
            checks++;
            if (sb.size() == 0 || rdata != sb[0]) begin
              failures++; $display("FAIL: read %0h expected %0h", rdata, sb.size() ? sb[0] : '0);
            end
            if (sb.size()) void'(sb.pop_front());
          end
        end
      end
    join
    // Drain the rest.
    ren = 0;
    repeat (6) @(posedge rclk);
    while (!rempty) begin
      @(negedge rclk);
      ren = 1;
      checks++;
      if (sb.size() == 0 || rdata != sb[0]) begin failures++; $display("FAIL: drain"); end
      if (sb.size()) void'(sb.pop_front());
      @(posedge rclk);
      #1 ren = 0;
    end
    checks++;
    if (sb.size() != 0) begin failures++; $display("FAIL: %0d entries lost", sb.size()); end
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
