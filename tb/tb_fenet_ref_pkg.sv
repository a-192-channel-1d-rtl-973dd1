// tb_fenet_ref_pkg: plain integer reference model of the feature extractor,
// written from the arithmetic definition rather than from the RTL, plus a
// small random-number helper. Used by the block and system testbenches.
//
// Model of one channel for one bin:
//   layer l, N inputs, kernel K, stride S: N' = (N + K - 1) / S outputs,
//   output i = sum over j of x[S*(i+1)-1-j] * w[j] for indices inside 0..N-1,
//   taken newest sample first; each product is sign * (|x|*|w| >> 4), and
//   the running sum is clamped to the 16-bit range after every step.
//   Traversal output: (acc + 2) >> 2 with the magnitude limited to 255.
//   Feature path: LReLU (negative -> |acc| >> leak), then the same rounding,
//   summed into the pool; the last layer also pools its rectified traversal
//   result into slot 7. Feature = pool rounded-divided by 2^div, magnitude
//   limited to 255, sign-magnitude.
package tb_fenet_ref_pkg;

  typedef int iq_t[$];

  int n_clamps;   // how often the accumulator hit a limit (statistics)

  function automatic int sm2i(input logic [8:0] v);
    return v[8] ? -int'(v[7:0]) : int'(v[7:0]);
  endfunction

  function automatic logic [8:0] i2sm(input int v);
    int m;
    m = (v < 0) ? -v : v;
    if (m > 255) m = 255;
    return {(v < 0) && (m != 0), 8'(m)};
  endfunction

  function automatic int mul(input int a, input int w);
    int m;
    m = (((a < 0) ? -a : a) * ((w < 0) ? -w : w)) >>> 4;
    return ((a < 0) != (w < 0)) ? -m : m;
  endfunction

  function automatic int clamp16(input int v);
    if (v > 32767)  begin n_clamps++; return 32767;  end
    if (v < -32768) begin n_clamps++; return -32768; end
    return v;
  endfunction

  function automatic int rnd_act(input int acc);   // integer value of the 9-bit result
    return sm2i(i2sm((acc + 2) >>> 2));
  endfunction

  function automatic int leaky(input int acc, input int leak);
    int m;
    if (acc >= 0) return acc;
    m = (-acc) >>> leak;
    return (m > 32767) ? 32767 : m;
  endfunction

  function automatic int fmt(input int pool, input int div);
    int r;
    r = (div == 0) ? pool : ((pool + (1 <<< (div - 1))) >>> div);
    return sm2i(i2sm(r));
  endfunction

  // One bin of one channel. k, s, leak, div are indexed by layer (slot 7
  // holds the terminal leak and div); wt/wf are the traversal and feature
  // weights of layer l, tap j at [l][j]. Returns layers + 1 feature values.
  function automatic iq_t run_bin(input iq_t x_in, input int layers,
                                  input int k[8], input int s[8], input int leak[8],
                                  input int div[8], input int wt[8][256], input int wf[8][256]);
    iq_t x, y, feats;
    int pool[8];
    for (int i = 0; i < 8; i++) pool[i] = 0;
    x = x_in;
    for (int l = 0; l < layers; l++) begin
      int n, no;
      n  = x.size();
      no = (n + k[l] - 1) / s[l];
      y  = {};
      for (int i = 0; i < no; i++) begin
        int p, at, af;
        p = s[l] * (i + 1) - 1;
        at = 0; af = 0;
        for (int j = 0; j < k[l]; j++) begin
          int idx;
          idx = p - j;
          if (idx >= 0 && idx < n) begin
            at = clamp16(at + mul(x[idx], wt[l][j]));
            af = clamp16(af + mul(x[idx], wf[l][j]));
          end
        end
        y.push_back(rnd_act(at));
        pool[l] += rnd_act(leaky(af, leak[l]));
        if (l == layers - 1) pool[7] += rnd_act(leaky(at, leak[7]));
      end
      x = y;
    end
    feats = {};
    for (int l = 0; l < layers; l++) feats.push_back(fmt(pool[l], div[l]));
    feats.push_back(fmt(pool[7], div[7]));
    return feats;
  endfunction

  // Number of outputs of each layer and taps actually multiplied (for
  // schedule checks against the published operation counts).
  function automatic void counts(input int b, input int layers, input int k[8], input int s[8],
                                 output int writes, output int pools, output int macs,
                                 output int np_macs);
    int n, no;
    n = b; writes = b; pools = 0; macs = 0; np_macs = 0;
    for (int l = 0; l < layers; l++) begin
      no = (n + k[l] - 1) / s[l];
      for (int i = 0; i < no; i++) begin
        int p, hi, lo;
        p  = s[l] * (i + 1) - 1;
        hi = (p < n - 1) ? p : n - 1;
        lo = (p - k[l] + 1 > 0) ? p - k[l] + 1 : 0;
        np_macs += 2 * (hi - lo + 1);
      end
      macs   += 2 * k[l] * no;
      pools  += no;
      writes += no;
      n = no;
    end
    pools += n;
  endfunction

endpackage
