// mac_datapath: one of the two arithmetic data paths of a processing element
// (the feature path or the traversal path).
//
// Each MAC step multiplies a 9-bit sign-magnitude activation by a 9-bit
// sign-magnitude weight and adds or subtracts the product (the sign is the
// XOR of the two signs) in a 16-bit two's complement accumulator that clamps
// at its limits instead of wrapping. On a rectify step the accumulator goes
// through the leaky ReLU, which for negative values is a right shift of the
// magnitude (slope -2^-leak; leak = 0 gives the absolute value). q is the
// accumulator rounded to a 9-bit sign-magnitude activation.
//
// Formats, clamping, the shift-based LReLU and the 16-bit accumulator follow
// the design description. The chip performs each multiplication word-serially
// with an 8-bit adder on a fast MAC clock; here a whole product is formed and
// added in one clock, and the product is truncated to the accumulator's
// 8 fractional bits (this design's choice).
//
// Timing: op is sampled at the rising edge of clk; q is combinational from
// the accumulator. With en low (channel powered down) the accumulator holds.
module mac_datapath
  import fenet_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       clr,        // clear the accumulator
  input  logic       mac,        // accumulate act * wt
  input  logic       rectify,    // apply the leaky ReLU to the accumulator
  input  logic [2:0] leak,
  input  sm9_t       act,
  input  sm9_t       wt,
  output acc_t       acc,
  output sm9_t       q
);
  logic [2*MAG_W-1:0]         prod_full;
  logic [ACC_W-1:0]           prod;
  logic signed [ACC_W+1:0]    sum;

  assign prod_full = act[MAG_W-1:0] * wt[MAG_W-1:0];
  assign prod      = ACC_W'(prod_full >> (2*ACT_FRAC - ACC_FRAC));
  assign sum       = (act[8] ^ wt[8]) ? ($signed({{2{acc[ACC_W-1]}}, acc}) - $signed({2'b00, prod}))
                                      : ($signed({{2{acc[ACC_W-1]}}, acc}) + $signed({2'b00, prod}));
  assign q         = acc_to_sm(acc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          acc <= '0;
    else if (en) begin
      if (clr)           acc <= '0;
      else if (mac)      acc <= sat_acc(sum);
      else if (rectify)  acc <= lrelu(acc, leak);
    end
  end
endmodule
