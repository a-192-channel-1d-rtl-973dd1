// weight_sram: kernel weight memory, 256 entries of two 9-bit sign-magnitude
// weights: the traversal-path weight and the feature-path weight of the same
// tap. Both are read together and broadcast to every processing element.
//
// The organisation (9 bits x 2 x 256) is the design description's. Layer l
// occupies entries base_l .. base_l + K_l - 1, where base_l is the sum of
// the kernel lengths of the layers below it, so all kernels together may
// use at most 256 taps. This design gives the array a separate write port
// (written from the weight/configuration write queue) next to the read
// port used during convolution; reads have one cycle of latency.
module weight_sram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 9,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // write port
  input  logic          we,
  input  logic          wsel,      // 0: traversal weight, 1: feature weight
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  // read port
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  wt_trav,
  output logic [W-1:0]  wt_feat
);
  logic [W-1:0] mem_t [DEPTH];
  logic [W-1:0] mem_f [DEPTH];

  always_ff @(posedge clk) begin
    if (we && !wsel) mem_t[waddr] <= wdata;
    if (we &&  wsel) mem_f[waddr] <= wdata;
    if (re) begin
      wt_trav <= mem_t[raddr];
      wt_feat <= mem_f[raddr];
    end
  end
endmodule
