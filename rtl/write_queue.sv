// write_queue: carries configuration and weight writes from the interface
// clock domain to the system clock domain.
//
// The block diagram of the design has a weight writing queue between the
// data interface and the weight SRAM; here the same queue also carries the
// configuration register writes, so that every write crosses the clock
// boundary through one dual-clock FIFO (this design's choice). An entry is
// {is_weight, addr[7:0], data[15:0]}. On the system side one entry is
// drained per clock and becomes either a configuration write (cfg_we,
// cfg_addr, cfg_data) or a weight write (wt_we, wt_sel = data[9],
// wt_addr = addr, wt_data = data[8:0]), both one-cycle pulses.
// full is the back-pressure towards the interface.
module write_queue #(
  parameter int unsigned DEPTH = 4
) (
  input  logic        iclk,
  input  logic        irst_n,
  input  logic        push,
  input  logic        is_weight,
  input  logic [7:0]  addr,
  input  logic [15:0] data,
  output logic        full,
  input  logic        clk,
  input  logic        rst_n,
  output logic        cfg_we,
  output logic [7:0]  cfg_addr,
  output logic [15:0] cfg_data,
  output logic        wt_we,
  output logic        wt_sel,
  output logic [7:0]  wt_addr,
  output logic [8:0]  wt_data
);
  logic [24:0] head;
  logic        empty;

  async_queue #(.WIDTH(25), .DEPTH(DEPTH)) u_q (
    .wclk(iclk), .wrst_n(irst_n), .wen(push), .wdata({is_weight, addr, data}), .wfull(full),
    .rclk(clk), .rrst_n(rst_n), .ren(!empty), .rdata(head), .rempty(empty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_we   <= 1'b0;
      wt_we    <= 1'b0;
      cfg_addr <= '0;
      cfg_data <= '0;
      wt_sel   <= 1'b0;
      wt_addr  <= '0;
      wt_data  <= '0;
    end else begin
      cfg_we   <= !empty && !head[24];
      wt_we    <= !empty &&  head[24];
      cfg_addr <= head[23:16];
      cfg_data <= head[15:0];
      wt_sel   <= head[9];
      wt_addr  <= head[23:16];
      wt_data  <= head[8:0];
    end
  end
endmodule
