// async_queue: dual-clock first-in first-out queue.
//
// Used as the small asynchronous queue (AQ) in front of every channel, which
// lets neural samples arrive on the interface clock while the channel SRAM is
// busy with computation, and reused for the weight/configuration write queue
// and for returning features to the interface. The default depth of 4 is the
// AQ size given in the design description; the pointer scheme is this
// design's own: binary pointers with one extra wrap bit, exchanged between
// the domains as Gray code through two-flop synchronisers.
//
// Interface: write side (wclk, wrst_n, wen, wdata, wfull), read side (rclk,
// rrst_n, ren, rdata, rempty). rdata shows the oldest entry whenever rempty
// is low (first-word fall-through), and ren removes it at the next rclk edge.
// A write while wfull, or a read while rempty, is ignored. Full and empty are
// pessimistic by the two synchroniser cycles, as usual.
module async_queue #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 4      // power of two
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wgray = bin2gray(wbin);
  assign rgray = bin2gray(rbin);

  // Full when the write pointer is one lap ahead of the synchronised read pointer.
  assign wfull  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wen && !wfull) wbin <= wbin + 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wen && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (ren && !rempty) rbin <= rbin + 1'b1;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("async_queue: DEPTH must be a power of two, at least 2");
  end
endmodule
