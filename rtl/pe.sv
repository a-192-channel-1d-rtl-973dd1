// pe: the processing element of one neural channel.
//
// Two fused data paths work on the same input activation: the feature path
// (feature-generating kernel) and the traversal path (traversal kernel).
// After a convolution the PE control FSM broadcasts the update steps:
//   PE_LRELU    latches the rounded traversal result in the intermediate
//               feature register (it is later written into the next layer's
//               SRAM partition) and rectifies the feature accumulator; on the
//               last active layer the traversal accumulator is rectified too.
//   PE_ADD_POOL adds the rounded, rectified feature result to the pooling
//               register of the current layer and, on the last layer, the
//               rectified traversal result to the terminal pooling register 7.
// At the end of a bin each used pooling register is formatted:
//   PE_DIV_POOL divides by 2^div (keeping one extra bit for rounding),
//   PE_ROUND    rounds half up, saturates to a 9-bit sign-magnitude feature
//               and writes it into that layer's feature shift register,
//   PE_RESTORE  clears the pooling register for the next bin.
// Pooling registers are 22-bit two's complement and saturate.
//
// Feature scan chain: the 8 feature registers of all channels form one chain
// that moves one 9-bit word per shift, towards chain_out. A register whose
// layer is unused, or every register of a powered-down channel, is skipped
// by a multiplexer, so only live features are exported. Order: slot 0 is
// nearest chain_out, chain_in comes from the next channel.
//
// Following the design description: two data paths, 22-bit pooling, 9-bit
// features, 7 feature pooling registers plus one terminal register, the skip
// multiplexer. This design's choices: the exact step order, the extra rounding
// bit, saturation of the pooling registers, and applying the LReLU (with
// the slot-7 leak) to the terminal traversal result as well.
module pe
  import fenet_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ch_en,       // channel powered
  input  logic [MAX_LAYERS-1:0] slot_en,     // feature slots in use
  // broadcast control
  input  pe_op_e                op,
  input  logic [2:0]            op_slot,     // layer (or slot 7 for format)
  input  logic                  op_last,     // current layer is the last one
  input  logic [2:0]            leak,        // leak of the current layer
  input  logic [2:0]            leak_term,   // leak of the terminal traversal
  input  logic [4:0]            div,         // division shift of op_slot
  input  sm9_t                  wt_trav,
  input  sm9_t                  wt_feat,
  // activation from this channel's SRAM lane
  input  sm9_t                  act,
  output sm9_t                  inter,       // intermediate feature register
  // feature scan chain
  input  logic                  shift,
  input  sm9_t                  chain_in,
  output sm9_t                  chain_out
);
  sm9_t q_f, q_t;
  pool_t pool [MAX_LAYERS];
  logic signed [POOL_W:0] divbuf;            // divided value with one rounding bit
  sm9_t fr [MAX_LAYERS];

  logic rect_f, rect_t;
  assign rect_f = (op == PE_LRELU);
  assign rect_t = (op == PE_LRELU) && op_last;

  mac_datapath u_feat (
    .clk, .rst_n, .en(ch_en),
    .clr(op == PE_CLR), .mac(op == PE_MAC), .rectify(rect_f), .leak(leak),
    .act, .wt(wt_feat), .acc(), .q(q_f)
  );

  mac_datapath u_trav (
    .clk, .rst_n, .en(ch_en),
    .clr(op == PE_CLR), .mac(op == PE_MAC), .rectify(rect_t), .leak(leak_term),
    .act, .wt(wt_trav), .acc(), .q(q_t)
  );

  function automatic pool_t pool_add(input pool_t p, input sm9_t v);
    logic signed [POOL_W:0] s;
    s = $signed({p[POOL_W-1], p}) + POOL_W'(sm_to_int(v));
    if (s > $signed({2'b00, {(POOL_W-1){1'b1}}}))      return {1'b0, {(POOL_W-1){1'b1}}};
    else if (s < -$signed({2'b01, {(POOL_W-1){1'b0}}})) return {1'b1, {(POOL_W-1){1'b0}}};
    else                                                 return s[POOL_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inter  <= '0;
      divbuf <= '0;
      for (int i = 0; i < MAX_LAYERS; i++) pool[i] <= '0;
    end else if (ch_en) begin
      unique case (op)
        PE_LRELU:    inter <= q_t;
        PE_ADD_POOL: begin
          pool[op_slot] <= pool_add(pool[op_slot], q_f);
          if (op_last) pool[TERM_SLOT] <= pool_add(pool[TERM_SLOT], q_t);
        end
        PE_DIV_POOL: begin
          if (div == 0) divbuf <= {pool[op_slot], 1'b0};
          else          divbuf <= $signed({pool[op_slot][POOL_W-1], pool[op_slot]}) >>> (div - 1);
        end
        PE_RESTORE:  pool[op_slot] <= '0;
        default: ;
      endcase
    end
  end

  // Feature scan chain with skip multiplexers.
  logic [MAX_LAYERS-1:0] live;
  sm9_t nxt [MAX_LAYERS];
  assign live = ch_en ? slot_en : '0;

  always_comb begin
    nxt[MAX_LAYERS-1] = chain_in;
    for (int k = MAX_LAYERS-2; k >= 0; k--)
      nxt[k] = live[k+1] ? fr[k+1] : nxt[k+1];
  end
  assign chain_out = live[0] ? fr[0] : nxt[0];

  logic signed [POOL_W:0] rounded;
  assign rounded = (divbuf + 1) >>> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_LAYERS; i++) fr[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < MAX_LAYERS; i++)
        if (live[i]) fr[i] <= nxt[i];
    end else if (ch_en && op == PE_ROUND) begin
      fr[op_slot] <= int_to_sm(rounded);
    end
  end
endmodule
