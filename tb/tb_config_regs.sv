// tb_config_regs: checks reset values, every field of the address map, the
// channel enable groups, the enabled-channel count and the feature slot mask.
`timescale 1ns/1ps
module tb_config_regs;
  import fenet_pkg::*;
  localparam int NCH = 40;
  logic clk = 0, rst_n = 1, we = 0;
  // Resets start high and fall at 1 ns so that every asynchronous reset sees an edge.
  initial #1 {rst_n} = '0;
  logic [7:0] addr = '0;
  logic [15:0] wdata = '0;
  logic run;
  logic [2:0] layers;
  logic [BIN_W-1:0] bin_strides;
  layer_cfg_t layer_cfg [MAX_LAYERS];
  logic [NCH-1:0] ch_en;
  logic [MAX_LAYERS-1:0] slot_en;
  logic [$clog2(NCH+1)-1:0] n_ch_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  config_regs #(.NCH(NCH)) dut (.*);

  task automatic wr(input int a, input int d);
    @(negedge clk); we = 1; addr = 8'(a); wdata = 16'(d);
    @(negedge clk); we = 0;
  endtask

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!run && layers == 1 && ch_en == '1 && n_ch_en == NCH, "reset values");
    wr(8'h01, 3); wr(8'h02, 75); wr(8'h00, 1);
    for (int l = 0; l < 8; l++) begin
      wr(8'h10 + 2*l, ((l + 1) << 8) | (10 + l));
      wr(8'h11 + 2*l, ((l + 3) << 8) | (l % 8));
    end
    chk(run && layers == 3 && bin_strides == 75, "control fields");
    for (int l = 0; l < 8; l++)
      chk(layer_cfg[l].k == 8'(10 + l) && layer_cfg[l].s == 4'(l + 1) &&
          layer_cfg[l].leak == 3'(l) && layer_cfg[l].div == 5'(l + 3), $sformatf("layer %0d", l));
    chk(slot_en == 8'b1000_0111, "slot mask for 3 layers");
    wr(8'h40, 16'h00F0); wr(8'h41, 16'h0000); wr(8'h42, 16'h0081);
    chk(ch_en == 40'h81_0000_00F0, "channel enables");
    chk(n_ch_en == 6, "enabled count");
    wr(8'h01, 7);
    chk(slot_en == 8'hFF, "slot mask for 7 layers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
