// polar_pkg: types, constants and elaboration-time functions shared by the
// SC-MJL polar decoder.
//
// LLR format. Every LLR inside the decoder is a Q-bit sign-magnitude word
// with the sign in bit 0 and the magnitude in bits [Q-1:1]:
//   word = {mag, sign},  LLR = (sign ? -1 : +1) * (mag + 1/2).
// The half-step offset (a mid-rise quantiser) means a word never encodes
// zero, so a 1-bit word is a pure hard decision and the width can shrink all
// the way to one bit, as the progressive ("5-to-1") quantisation requires.
// The offset convention and the sign-in-LSB packing are choices of this
// design.
//
// Code description. A frozen mask has bit i set when u_i is frozen, with u_0
// decoded first (natural order, G_N = F^{(x)n}, F = [[1,0],[1,1]]).
// pw_frozen() builds a default mask from the polarisation-weight rule
// (beta = 2^(1/4)); the choice of construction is this design's own.
//
// Decoding tree. node_kind() classifies a block of the mask as one of the
// constituent codes decoded in one stage (rate-0, rate-1, repetition by a MAP
// decoder, single parity check by a Wagner decoder, both for blocks up to
// N_LIM long, and any block of length N_MJL by the MJL decoder) or as a
// block that is split further by SC. node_stages() counts the pipeline
// stages of a subtree (T_N = T_left + T_right + 2, one stage per leaf), and
// nreg() counts which of them carry a register when register balancing
// keeps only every MERGE-th stage register.
package polar_pkg;

  // Largest code length the parameter types can hold.
  localparam int unsigned NMAX = 1024;
  // Largest constituent block the leaf decoders and transforms handle.
  localparam int unsigned LEAF_MAX = 64;

  typedef logic [NMAX-1:0]     mask_t;
  typedef logic [LEAF_MAX-1:0] leaf_vec_t;

  typedef enum logic [2:0] {
    NODE_RATE0 = 3'd0,
    NODE_RATE1 = 3'd1,
    NODE_REP   = 3'd2,
    NODE_SPC   = 3'd3,
    NODE_MJL   = 3'd4,
    NODE_SPLIT = 3'd5
  } node_kind_e;

  // Decoded fields of one LLR word.
  typedef struct packed {
    logic        sign;
    logic [15:0] mag;
  } llr_t;

  function automatic int unsigned log2c(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((32'd1 << r) < v) r++;
    return r;
  endfunction

  function automatic int unsigned max_mag(input int unsigned q);
    return (32'd1 << (q - 1)) - 1;
  endfunction

  // Progressive quantisation: LLR width at a node of length 2^lg. The width
  // falls linearly (rounded up) from q_ch at the root to q_min at the
  // length-N_MJL leaves.
  function automatic int unsigned qbits(input int unsigned lg, input int unsigned lg_root,
                                        input int unsigned lg_leaf, input int unsigned q_ch,
                                        input int unsigned q_min);
    int unsigned span, num;
    if (lg_root <= lg_leaf) return q_ch;
    if (lg >= lg_root) return q_ch;
    if (lg <= lg_leaf) return q_min;
    span = lg_root - lg_leaf;
    num  = (q_ch - q_min) * (lg - lg_leaf);
    return q_min + (num + span - 1) / span;
  endfunction

  function automatic node_kind_e node_kind(input mask_t fz, input int unsigned off,
                                           input int unsigned size, input int unsigned n_mjl,
                                           input int unsigned n_lim);
    int unsigned nf;
    nf = 0;
    if (size <= n_lim) begin
      for (int unsigned i = 0; i < size; i++) nf += int'(fz[off+i]);
      if (nf == size) return NODE_RATE0;
      if (nf == 0) return NODE_RATE1;
      if (nf == size - 1 && !fz[off+size-1]) return NODE_REP;
      if (nf == 1 && fz[off]) return NODE_SPC;
    end
    if (size <= n_mjl) return NODE_MJL;
    return NODE_SPLIT;
  endfunction

  // Number of pipeline stages of the subtree rooted at block (off, size).
  function automatic int unsigned node_stages(input mask_t fz, input int unsigned off,
                                              input int unsigned size, input int unsigned n_mjl,
                                              input int unsigned n_lim);
    int unsigned t;
    bit          live;
    t = 0;
    for (int unsigned s = size; s >= 1; s = s / 2) begin
      for (int unsigned p = off; p < off + size; p += s) begin
        // a block exists in the tree when every enclosing block is split
        live = 1'b1;
        for (int unsigned a = size; a > s; a = a / 2)
          if (node_kind(fz, off + ((p - off) / a) * a, a, n_mjl, n_lim) != NODE_SPLIT)
            live = 1'b0;
        if (live) t += (node_kind(fz, p, s, n_mjl, n_lim) == NODE_SPLIT) ? 2 : 1;
      end
      if (s <= n_mjl) break;
    end
    return t;
  endfunction

  // Registered stages among stage indices [start, start+len) when every
  // MERGE-th stage (index mod MERGE == MERGE-1) ends in a register.
  function automatic int unsigned nreg(input int unsigned start, input int unsigned len,
                                       input int unsigned merge);
    return (start + len) / merge - start / merge;
  endfunction

  function automatic bit stage_is_reg(input int unsigned idx, input int unsigned merge);
    return (idx % merge) == (merge - 1);
  endfunction

  // Polarisation-weight construction: W(i) = sum_j b_j(i) * 2^(j/4); the K
  // indices of largest weight carry information, the rest are frozen.
  function automatic real pw_weight(input int unsigned i, input int unsigned n);
    real w, p;
    w = 0.0;
    p = 1.0;
    for (int unsigned j = 0; j < n; j++) begin
      if (((i >> j) & 1) != 0) w += p;
      p = p * 1.189207115002721;
    end
    return w;
  endfunction

  function automatic int unsigned pw_count_above(input real t, input int unsigned n);
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < (32'd1 << n); i++)
      if (pw_weight(i, n) > t) c++;
    return c;
  endfunction

  function automatic mask_t pw_frozen(input int unsigned n, input int unsigned k);
    real         lo, hi, mid;
    int unsigned c;
    mask_t       m;
    lo  = -1.0;
    hi  = real'(n) * 2.0 + 1.0;
    mid = lo;
    // bisection for a threshold with exactly k weights above it
    for (int it = 0; it < 80; it++) begin
      mid = (lo + hi) / 2.0;
      c   = pw_count_above(mid, n);
      if (c == k) break;
      if (c > k) lo = mid;
      else hi = mid;
    end
    m = '0;
    for (int unsigned i = 0; i < (32'd1 << n); i++)
      m[i] = (pw_weight(i, n) > mid) ? 1'b0 : 1'b1;
    return m;
  endfunction

  // x = u * G_n for a block of up to LEAF_MAX bits (the transform is its own
  // inverse, so the same function maps a codeword back to u).
  function automatic leaf_vec_t polar_xform(input leaf_vec_t u, input int unsigned size);
    leaf_vec_t x;
    x = u;
    for (int unsigned s = 1; s < size; s = s * 2)
      for (int unsigned i = 0; i < size; i++)
        if ((i & s) == 0) x[i] = x[i] ^ x[i+s];
    return x;
  endfunction

  function automatic llr_t llr_unpack(input logic [15:0] w, input int unsigned q);
    llr_t r;
    r.sign = w[0];
    r.mag  = (w >> 1) & 16'(max_mag(q));
    return r;
  endfunction

  function automatic logic [15:0] llr_pack(input llr_t l, input int unsigned q);
    logic [15:0] m;
    m = (l.mag > 16'(max_mag(q))) ? 16'(max_mag(q)) : l.mag;
    return (m << 1) | 16'(l.sign);
  endfunction

  // Twice the LLR value of a word: (sign ? -1 : 1) * (2*mag + 1).
  function automatic int llr2x(input llr_t l);
    int v;
    v = 2 * int'(l.mag) + 1;
    return l.sign ? -v : v;
  endfunction

  // Min-sum check-node update.
  function automatic llr_t f_op(input llr_t a, input llr_t b);
    llr_t r;
    r.sign = a.sign ^ b.sign;
    r.mag  = (a.mag < b.mag) ? a.mag : b.mag;
    return r;
  endfunction

  // Variable-node update with the partial sum of the left half:
  // b + (-1)^beta * a. A tie takes the sign of b; the magnitude is half the
  // doubled sum (round half away from zero), saturated by llr_pack.
  function automatic llr_t g_op(input llr_t a, input llr_t b, input logic beta);
    llr_t ae;
    llr_t r;
    int   s;
    ae      = a;
    ae.sign = a.sign ^ beta;
    s       = llr2x(ae) + llr2x(b);
    if (s == 0) begin
      r.sign = b.sign;
      r.mag  = '0;
    end else begin
      r.sign = (s < 0);
      r.mag  = 16'(((s < 0) ? -s : s) / 2);
    end
    return r;
  endfunction

endpackage
