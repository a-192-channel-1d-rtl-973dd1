// config_regs: configuration registers of the feature extractor (system
// clock domain).
//
// They hold the model (number of convolving layers, per-layer kernel length,
// stride, LReLU leak and pooling division shift, the leak and division of
// the terminal traversal feature in slot 7), the bin length as a count of
// first-layer strides, the run bit and one enable bit per channel. The set
// of parameters follows the design description ("kernel size, stride, LReLU
// leak slope, and pooling parameters are all configurable"; bins are the
// first-layer stride times a programmable counter of up to 2048); the
// address map, field packing and reset values are this design's:
//   0x00  bit 0: run
//   0x01  [2:0]: number of convolving layers (1..7, features = layers + 1)
//   0x02  [11:0]: bin length in first-layer strides
//   0x10 + 2*l  [7:0]: kernel length K_l, [11:8]: stride S_l   (l = 0..7)
//   0x11 + 2*l  [2:0]: leak shift, [12:8]: division shift       (l = 0..7)
//   0x40 + g    channel enables 16*g .. 16*g+15
// Slot 7 (0x1E/0x1F) only uses its leak and division fields. Writes take
// effect at the next clock edge; change the model only while run is low.
// slot_en marks the feature slots in use (layers 0..L-1 and slot 7) and
// n_ch_en counts the enabled channels.
module config_regs
  import fenet_pkg::*;
#(
  parameter int unsigned NCH = 192
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [7:0]            addr,
  input  logic [15:0]           wdata,
  output logic                  run,
  output logic [2:0]            layers,
  output logic [BIN_W-1:0]      bin_strides,
  output layer_cfg_t            layer_cfg [MAX_LAYERS],
  output logic [NCH-1:0]        ch_en,
  output logic [MAX_LAYERS-1:0] slot_en,
  output logic [$clog2(NCH+1)-1:0] n_ch_en
);
  localparam int unsigned NGRP = (NCH + 15) / 16;
  logic [NGRP*16-1:0] en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run         <= 1'b0;
      layers      <= 3'd1;
      bin_strides <= BIN_W'(1);
      for (int l = 0; l < MAX_LAYERS; l++) layer_cfg[l] <= '{k: 8'd1, s: 4'd1, leak: 3'd0, div: 5'd0};
      en_q        <= '1;
    end else if (we) begin
      if (addr == 8'h00) run         <= wdata[0];
      if (addr == 8'h01) layers      <= wdata[2:0];
      if (addr == 8'h02) bin_strides <= wdata[BIN_W-1:0];
      for (int l = 0; l < MAX_LAYERS; l++) begin
        if (addr == 8'(8'h10 + 2*l)) begin
          layer_cfg[l].k <= wdata[7:0];
          layer_cfg[l].s <= wdata[11:8];
        end
        if (addr == 8'(8'h11 + 2*l)) begin
          layer_cfg[l].leak <= wdata[2:0];
          layer_cfg[l].div  <= wdata[12:8];
        end
      end
      for (int g = 0; g < NGRP; g++)
        if (addr == 8'(8'h40 + g)) en_q[g*16 +: 16] <= wdata;
    end
  end

  assign ch_en = en_q[NCH-1:0];

  always_comb begin
    for (int k = 0; k < MAX_LAYERS; k++) slot_en[k] = (k < int'(layers)) || (k == TERM_SLOT);
    n_ch_en = '0;
    for (int c = 0; c < NCH; c++) n_ch_en = n_ch_en + ch_en[c];
  end
endmodule
