// tb_channel_sram: random lane-masked writes and reads against a model
// array; checks the one-cycle read latency and that unselected lanes keep
// their contents.
`timescale 1ns/1ps
module tb_channel_sram;
  localparam int L = 8, LW = 9, D = 256;
  logic clk = 0, en = 0, we = 0;
  logic [L-1:0] lane_we = '0;
  logic [7:0] addr = '0;
  logic [L*LW-1:0] din = '0, dout;
  logic [L*LW-1:0] model [D];
  logic [D-1:0] valid = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  channel_sram #(.LANES(L), .LANE_W(LW), .DEPTH(D)) dut (.*);

  initial begin
    // Initialise every word with full writes.
    for (int a = 0; a < D; a++) begin
      @(negedge clk); en = 1; we = 1; lane_we = '1; addr = 8'(a);
      din = {$urandom, $urandom, $urandom};
      model[a] = din;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom_range(5) != 0);
      we = $urandom_range(1);
      lane_we = 8'($urandom);
      addr = 8'($urandom_range(15));      // small range so reads hit recent writes
      din = {$urandom, $urandom, $urandom};
      if (en && we)
        for (int l = 0; l < L; l++) if (lane_we[l]) model[addr][l*LW +: LW] = din[l*LW +: LW];
      if (en && !we) begin
        logic [L*LW-1:0] exp_w;
        exp_w = model[addr];
        @(posedge clk); #1;
        checks++;
        if (dout !== exp_w) begin failures++; $display("FAIL: addr %0d read %h expected %h", addr, dout, exp_w); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
