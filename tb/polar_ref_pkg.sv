// polar_ref_pkg: behavioural reference model of SC-MJL polar decoding, used
// by the testbenches to predict the decoder's outputs bit for bit.
//
// It is written independently of the RTL: a recursive software SC decoder
// on plain integers. An LLR word {mag, sign} is held here as its doubled
// value, an odd integer d = (sign ? -1 : 1) * (2*mag + 1). The model also
// holds the encoder, the polarisation-weight code construction (by ranking),
// and event counters that show which decoding mechanisms a test exercised.
package polar_ref_pkg;

  // configuration of the model
  int unsigned r_nmjl  = 8;
  int unsigned r_nlim  = 32;
  int unsigned r_qch   = 5;
  int unsigned r_qmin  = 1;
  int unsigned r_lgroot = 4;
  bit          r_fz[];
  bit          r_u[];

  // event counters
  int unsigned n_rate0, n_rate1, n_rep, n_spc, n_spc_flip, n_mjl, n_mjl_fix, n_sat, n_split;

  function automatic void clear_counts();
    n_rate0 = 0; n_rate1 = 0; n_rep = 0; n_spc = 0; n_spc_flip = 0;
    n_mjl = 0; n_mjl_fix = 0; n_sat = 0; n_split = 0;
  endfunction

  function automatic int unsigned lg2(int unsigned v);
    int unsigned r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // width at a node of length 2^lg: linear from r_qch (root) to r_qmin
  // (length-r_nmjl blocks), rounded up
  function automatic int unsigned ref_q(int unsigned lg);
    int unsigned ll = lg2(r_nmjl);
    real         fr;
    if (r_lgroot <= ll || lg >= r_lgroot) return r_qch;
    if (lg <= ll) return r_qmin;
    fr = real'(r_qch - r_qmin) * real'(lg - ll) / real'(r_lgroot - ll);
    return r_qmin + int'($ceil(fr - 1.0e-9));
  endfunction

  function automatic int dmax(int unsigned q);
    return 2 * ((1 << (q - 1)) - 1) + 1;
  endfunction

  function automatic int clampd(int d, int unsigned q);
    if (d > dmax(q)) return dmax(q);
    if (d < -dmax(q)) return -dmax(q);
    return d;
  endfunction

  // doubled value of a {mag, sign} word
  function automatic int w2d(int unsigned w);
    return ((w & 1) ? -1 : 1) * int'(2 * (w >> 1) + 1);
  endfunction

  function automatic int absi(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int fref(int a, int b, int unsigned q);
    int m = (absi(a) < absi(b)) ? absi(a) : absi(b);
    return clampd((((a < 0) != (b < 0)) ? -m : m), q);
  endfunction

  function automatic int gref(int a, int b, bit beta, int unsigned q);
    int t = b + (beta ? -a : a);
    int r;
    if (t == 0) r = (b < 0) ? -1 : 1;
    else r = (t < 0) ? t - 1 : t + 1;
    if (absi(r) > dmax(q)) n_sat++;
    return clampd(r, q);
  endfunction

  // x = u * F^{(x)n}, recursive definition x = [enc(ua) ^ enc(ub), enc(ub)]
  function automatic void encode(input bit u[], output bit x[]);
    bit ua[], ub[], xa[], xb[];
    int h = u.size() / 2;
    x = new[u.size()];
    if (u.size() == 1) begin
      x[0] = u[0];
      return;
    end
    ua = new[h]; ub = new[h];
    for (int i = 0; i < h; i++) begin ua[i] = u[i]; ub[i] = u[h+i]; end
    encode(ua, xa);
    encode(ub, xb);
    for (int i = 0; i < h; i++) begin x[i] = xa[i] ^ xb[i]; x[h+i] = xb[i]; end
  endfunction

  // node classes: 0 rate-0, 1 rate-1, 2 repetition, 3 SPC, 4 MJL, 5 split
  function automatic int classify(int off, int size);
    int nf = 0;
    for (int i = 0; i < size; i++) if (r_fz[off+i]) nf++;
    if (size <= int'(r_nlim)) begin
      if (nf == size) return 0;
      if (nf == 0) return 1;
      if (nf == size - 1 && !r_fz[off+size-1]) return 2;
      if (nf == 1 && r_fz[off]) return 3;
    end
    if (size <= int'(r_nmjl)) return 4;
    return 5;
  endfunction

  function automatic int stages(int off, int size);
    int c = classify(off, size);
    if (c != 5) return 1;
    return 2 + stages(off, size / 2) + stages(off + size / 2, size / 2);
  endfunction

  // decode block u[off +: size] from doubled LLRs a (already at the node's
  // width); returns the block's codeword estimate, writes r_u
  function automatic void ref_node(input int a[], input int off, input int size, output bit x[]);
    int c = classify(off, size);
    x = new[size];
    if (c == 5) begin
      int unsigned qc = ref_q(lg2(size) - 1);
      int h = size / 2;
      int la[], ra[];
      bit xl[], xr[];
      n_split++;
      la = new[h]; ra = new[h];
      for (int i = 0; i < h; i++) la[i] = fref(a[i], a[h+i], qc);
      ref_node(la, off, h, xl);
      for (int i = 0; i < h; i++) ra[i] = gref(a[i], a[h+i], xl[i], qc);
      ref_node(ra, off + h, h, xr);
      for (int i = 0; i < h; i++) begin x[i] = xl[i] ^ xr[i]; x[h+i] = xr[i]; end
      return;
    end
    case (c)
      0: begin
        n_rate0++;
        for (int i = 0; i < size; i++) x[i] = 0;
      end
      1: begin
        n_rate1++;
        for (int i = 0; i < size; i++) x[i] = (a[i] < 0);
      end
      2: begin
        int s = 0;
        n_rep++;
        foreach (a[i]) s += a[i];
        for (int i = 0; i < size; i++) x[i] = (s < 0);
      end
      3: begin
        bit p = 0;
        int mi = 0;
        n_spc++;
        for (int i = 0; i < size; i++) begin
          x[i] = (a[i] < 0);
          p ^= x[i];
          if (absi(a[i]) < absi(a[mi])) mi = i;
        end
        if (p) begin
          x[mi] = ~x[mi];
          n_spc_flip++;
        end
      end
      default: begin
        // exhaustive ML over the information patterns, lowest index wins ties
        int pos[$];
        int best = -(1 << 30);
        bit ub[], cw[];
        bit differs = 0;
        n_mjl++;
        for (int i = 0; i < size; i++) if (!r_fz[off+i]) pos.push_back(i);
        ub = new[size];
        for (int j = 0; j < (1 << pos.size()); j++) begin
          int sc = 0;
          for (int i = 0; i < size; i++) ub[i] = 0;
          foreach (pos[b]) ub[pos[b]] = ((j >> b) & 1) != 0;
          encode(ub, cw);
          for (int i = 0; i < size; i++) sc += cw[i] ? -a[i] : a[i];
          if (sc > best) begin
            best = sc;
            for (int i = 0; i < size; i++) x[i] = cw[i];
          end
        end
        for (int i = 0; i < size; i++) if (x[i] != (a[i] < 0)) differs = 1;
        if (differs) n_mjl_fix++;
      end
    endcase
    begin
      bit ul[];
      encode(x, ul);
      for (int i = 0; i < size; i++) r_u[off+i] = ul[i];
    end
  endfunction

  // decode a frame of channel words {mag, sign} of r_qch bits; returns u
  function automatic void ref_decode(input int unsigned words[], output bit u[]);
    int a[];
    bit x[];
    a = new[words.size()];
    foreach (words[i]) a[i] = ((words[i] & 1) ? -1 : 1) * int'(2 * (words[i] >> 1) + 1);
    r_u = new[words.size()];
    ref_node(a, 0, words.size(), x);
    u = r_u;
  endfunction

  // polarisation-weight construction by ranking: frozen = not among the K
  // largest weights sum_j b_j * 2^(j/4)
  function automatic void make_frozen(int unsigned n, int unsigned k);
    real w[];
    int  nn = 1 << n;
    w = new[nn];
    r_fz = new[nn];
    for (int i = 0; i < nn; i++) begin
      w[i] = 0.0;
      for (int j = 0; j < int'(n); j++) if ((i >> j) & 1) w[i] += 2.0 ** (real'(j) / 4.0);
    end
    for (int i = 0; i < nn; i++) begin
      int rank = 0;
      for (int j = 0; j < nn; j++) if (w[j] > w[i]) rank++;
      r_fz[i] = (rank >= int'(k));
    end
  endfunction

  // Gaussian sample by Box-Muller from $urandom
  function automatic real gauss();
    real u1 = (real'($urandom) + 1.0) / 4294967297.0;
    real u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // BPSK (bit 0 -> +1) over AWGN with noise deviation sigma, LLR = 2y/sigma^2
  // scaled by 'scale' LSBs per unit and quantised to q-bit {mag, sign} words
  function automatic int unsigned chan_word(bit xbit, real sigma, real scale, int unsigned q);
    real y = (xbit ? -1.0 : 1.0) + sigma * gauss();
    real l = 2.0 * y / (sigma * sigma) * scale;
    int unsigned m;
    real al = (l < 0.0) ? -l : l;
    m = int'($floor(al));
    if (m > (1 << (q - 1)) - 1) m = (1 << (q - 1)) - 1;
    return (m << 1) | ((l < 0.0) ? 1 : 0);
  endfunction

endpackage
