// fenet_pkg: types, sizes and arithmetic helpers shared by the 1D-CNN
// neural feature extractor.
//
// Number formats (from the design description): activations and weights are
// 9-bit sign-magnitude words, 1 sign bit and an 8-bit magnitude with 6
// fractional bits. Convolution partial sums live in a 16-bit two's complement
// accumulator that clamps instead of wrapping; pooling registers are 22 bits
// and features leave the chip as 9-bit words.
//
// This design's own choices: the accumulator carries 8 fractional bits (so a
// product, which has 12, is truncated by 4 bits before it is added), and the
// reduction from the accumulator to a 9-bit word rounds half up and
// saturates the magnitude at 255.
package fenet_pkg;

  localparam int unsigned ACT_W      = 9;    // sign-magnitude activation / weight
  localparam int unsigned MAG_W      = 8;    // magnitude part
  localparam int unsigned ACC_W      = 16;   // convolution accumulator
  localparam int unsigned ACC_FRAC   = 8;    // fractional bits in the accumulator
  localparam int unsigned ACT_FRAC   = 6;    // fractional bits of an activation
  localparam int unsigned POOL_W     = 22;   // pooling register
  localparam int unsigned MAX_LAYERS = 8;    // 7 feature layers + 1 terminal traversal
  localparam int unsigned CONV_LAYERS = 7;   // layers that can convolve
  localparam int unsigned TERM_SLOT  = 7;    // pooling slot of the terminal traversal
  localparam int unsigned WADDR_W    = 8;
  localparam int unsigned SDEPTH     = 256;  // channel SRAM depth
  localparam int unsigned SADDR_W    = 8;
  localparam int unsigned BIN_W      = 12;   // bin length in first-layer strides (up to 2048)
  localparam int unsigned CNT_W      = 16;   // per-layer sample / output counters

  typedef logic [ACT_W-1:0]         sm9_t;   // {sign, magnitude[7:0]}
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [POOL_W-1:0] pool_t;

  // Per-layer configuration, written through the configuration registers.
  typedef struct packed {
    logic [7:0] k;        // kernel length (taps), 1..255
    logic [3:0] s;        // stride, 1..15
    logic [2:0] leak;     // LReLU: negative inputs scaled by -2^-leak (0 gives |x|)
    logic [4:0] div;      // pooling normalisation: divide by 2^div
  } layer_cfg_t;

  // Micro-operations the PE control FSM broadcasts to every PE.
  typedef enum logic [2:0] {
    PE_NOP,
    PE_CLR,        // clear both accumulators (start of a convolution)
    PE_MAC,        // accumulate one tap on both data paths
    PE_LRELU,      // rectify the feature accumulator, latch the traversal result
    PE_ADD_POOL,   // add the rounded, rectified values into the pooling registers
    PE_DIV_POOL,   // shift the selected pooling register by the division factor
    PE_ROUND,      // round, saturate and write the feature shift register
    PE_RESTORE     // clear the pooling register for the next bin
  } pe_op_e;

  // Requests from the algorithm FSM to the PE control FSM.
  typedef enum logic [1:0] {
    REQ_NONE,
    REQ_CONVOLVE,
    REQ_UPDATE,
    REQ_FORMAT
  } pe_req_e;

  // Per-layer states of the algorithm control FSM.
  typedef enum logic [2:0] {
    L_IDLE,
    L_LOAD,
    L_WAIT_MULT,
    L_CONVOLVE,
    L_UPDATE,
    L_WAIT_RESULT,
    L_WAIT_FORMAT,
    L_FINISH
  } layer_state_e;

  // Signed value of a sign-magnitude word.
  function automatic logic signed [9:0] sm_to_int(input sm9_t v);
    return v[8] ? -$signed({2'b00, v[7:0]}) : $signed({2'b00, v[7:0]});
  endfunction

  // Clamp a wide signed value into the accumulator range.
  function automatic acc_t sat_acc(input logic signed [ACC_W+1:0] v);
    if (v > $signed({3'b000, {(ACC_W-1){1'b1}}}))      return {1'b0, {(ACC_W-1){1'b1}}};
    else if (v < -$signed({3'b001, {(ACC_W-1){1'b0}}})) return {1'b1, {(ACC_W-1){1'b0}}};
    else                                                 return v[ACC_W-1:0];
  endfunction

  // Signed value to sign-magnitude with magnitude saturation at 255.
  function automatic sm9_t int_to_sm(input logic signed [POOL_W:0] v);
    logic [POOL_W:0] mag;
    mag = v[POOL_W] ? -v : v;
    if (mag > 255) mag = 255;
    return {v[POOL_W] && (mag != 0), mag[7:0]};
  endfunction

  // Accumulator (8 fractional bits) to a 9-bit activation (6 fractional bits),
  // rounding half up.
  function automatic sm9_t acc_to_sm(input acc_t a);
    logic signed [ACC_W:0] r;
    r = ($signed({a[ACC_W-1], a}) + 17'sd2) >>> (ACC_FRAC - ACT_FRAC);
    return int_to_sm({{(POOL_W-ACC_W){r[ACC_W]}}, r});
  endfunction

  // Leaky ReLU with a negative slope of -2^-leak: negative inputs become
  // |x| >> leak, so leak = 0 takes the magnitude.
  function automatic acc_t lrelu(input acc_t a, input logic [2:0] leak);
    logic [ACC_W:0] m;
    if (!a[ACC_W-1]) return a;
    m = -$signed({a[ACC_W-1], a});
    m = m >> leak;
    if (m > 17'h7fff) m = 17'h7fff;
    return m[ACC_W-1:0];
  endfunction

endpackage
