// pe_ctrl: the processing-element control FSM.
//
// It turns one request of the algorithm control FSM into the sequence of
// micro-operations that is broadcast to every PE of the chip:
//   CONVOLVE  LOAD (clear the accumulators) -> ADD, one tap per clock, while
//             the SRAM activation address steps backwards through the layer's
//             circular partition and the weight address steps forwards
//             -> DONE
//   UPDATE    LRELU (rectify, latch the traversal result) -> ADD POOL -> DONE
//   FORMAT    DIVIDE POOL -> ROUND & QUANTIZE -> RESTORE POOL -> DONE
// The state names follow the PE control flow chart of the design
// description. The chip runs these steps on a MAC clock that is a multiple
// of the system clock, with the multiplication itself done word-serially
// and with extra states (LATCH POOL STALL, FINISH POOL, SHIFT POOL) for the
// bit-serial LReLU shift and realignment; in this design all PEs are
// clocked by one clock, each step takes one cycle, and those extra states
// are not needed.
//
// Timing: a request is accepted in IDLE (req != REQ_NONE). Reads are issued
// in ADD; because both SRAMs have one cycle of read latency the micro-op
// output op is registered, so PE_MAC arrives together with the data it
// needs. done pulses for one cycle when the sequence ends; busy is high from
// the accepted request until then.
module pe_ctrl
  import fenet_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // request from the algorithm FSM
  input  pe_req_e           req,
  input  logic [2:0]        req_slot,
  input  logic              req_last,
  input  logic [SADDR_W-1:0] act_start,   // address of the newest activation
  input  logic [SADDR_W-1:0] part_base,   // partition base address
  input  logic [7:0]        part_k,       // partition length (kernel length)
  input  logic [WADDR_W-1:0] wt_start,    // weight address of the first tap
  input  logic [7:0]        taps,         // taps to multiply (>= 1)
  output logic              busy,
  output logic              done,
  // memory reads
  output logic              sram_re,
  output logic [SADDR_W-1:0] sram_addr,
  output logic              wt_re,
  output logic [WADDR_W-1:0] wt_addr,
  // broadcast to the PEs
  output pe_op_e            op,
  output logic [2:0]        op_slot,
  output logic              op_last
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_ADD, S_LRELU, S_ADD_POOL,
    S_DIVIDE_POOL, S_ROUND, S_RESTORE_POOL, S_DONE
  } state_e;

  state_e state;
  logic [SADDR_W-1:0] addr, base, top;
  logic [WADDR_W-1:0] waddr;
  logic [7:0] cnt;

  assign busy      = (state != S_IDLE);
  assign sram_re   = (state == S_ADD);
  assign sram_addr = addr;
  assign wt_re     = (state == S_ADD);
  assign wt_addr   = waddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      op      <= PE_NOP;
      op_slot <= '0;
      op_last <= 1'b0;
      addr    <= '0;
      base    <= '0;
      top     <= '0;
      waddr   <= '0;
      cnt     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      op   <= PE_NOP;
      unique case (state)
        S_IDLE: begin
          op_slot <= req_slot;
          op_last <= req_last;
          unique case (req)
            REQ_CONVOLVE: begin
              addr  <= act_start;
              base  <= part_base;
              top   <= part_base + SADDR_W'(part_k) - 1'b1;
              waddr <= wt_start;
              cnt   <= taps;
              op    <= PE_CLR;
              state <= S_LOAD;
            end
            REQ_UPDATE: begin
              op    <= PE_LRELU;
              state <= S_LRELU;
            end
            REQ_FORMAT: begin
              op    <= PE_DIV_POOL;
              state <= S_DIVIDE_POOL;
            end
            default: ;
          endcase
        end
        S_LOAD: state <= S_ADD;
        S_ADD: begin
          op    <= PE_MAC;                        // data of this read arrives next cycle
          addr  <= (addr == base) ? top : addr - 1'b1;
          waddr <= waddr + 1'b1;
          cnt   <= cnt - 1'b1;
          if (cnt == 8'd1) state <= S_DONE;
        end
        S_LRELU: begin
          op    <= PE_ADD_POOL;
          state <= S_ADD_POOL;
        end
        S_ADD_POOL: state <= S_DONE;
        S_DIVIDE_POOL: begin
          op    <= PE_ROUND;
          state <= S_ROUND;
        end
        S_ROUND: begin
          op    <= PE_RESTORE;
          state <= S_RESTORE_POOL;
        end
        S_RESTORE_POOL: state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A convolution always multiplies at least one tap.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE && req == REQ_CONVOLVE) |-> taps != 0);
endmodule
