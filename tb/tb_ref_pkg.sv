// tb_ref_pkg: reference model used by the testbenches.
//
// The coupling cost of a transition is computed here from the signed change
// of every wire: with d_i = cur_i - prev_i in {-1, 0, +1}, the cost of the
// pair (i, i+1) is |d_i - d_(i+1)|, which is 1 for a Type I pair, 2 for a
// Type II pair and 0 for Types III and IV. Encoders are modelled by trying
// every allowed inversion and applying the decision rules of each scheme.
// Words are held in 64-bit vectors; w gives the width in use.
package tb_ref_pkg;

  typedef logic [63:0] word_t;

  function automatic word_t mask_of(input int unsigned w, input bit odd, input bit even);
    word_t m = '0;
    for (int i = 0; i < int'(w); i++)
      if ((i % 2 == 1 && odd) || (i % 2 == 0 && even)) m[i] = 1'b1;
    return m;
  endfunction

  function automatic int ref_cost(input int unsigned w, input word_t prev, input word_t cur);
    int c = 0;
    int d0, d1;
    for (int i = 0; i + 1 < int'(w); i++) begin
      d0 = int'(cur[i])   - int'(prev[i]);
      d1 = int'(cur[i+1]) - int'(prev[i+1]);
      c += (d0 > d1) ? d0 - d1 : d1 - d0;
    end
    return c;
  endfunction

  function automatic int ref_self(input int unsigned w, input word_t prev, input word_t cur);
    int c = 0;
    for (int i = 0; i < int'(w); i++) if (prev[i] == 1'b0 && cur[i] == 1'b1) c++;
    return c;
  endfunction

  // Reference encoder. scheme 0: none, 1: odd/none, 2: odd/full/none,
  // 3: odd/even/full/none. Returns the encoded word; kind is 0 none, 1 odd,
  // 2 even, 3 full.
  function automatic word_t ref_encode(input int unsigned w, input int scheme,
                                       input word_t prev, input word_t data,
                                       output int kind);
    word_t base, c_odd, c_even, c_full, wm;
    int p, po, pe, pf;
    wm = mask_of(w, 1, 1);
    kind = 0;
    if (scheme == 0) return data & wm;
    base = data & wm;
    base[w-1] = 1'b0;
    if (scheme >= 2) base[w-2] = 1'b0;
    c_odd  = base ^ mask_of(w, 1, 0);
    c_even = base ^ mask_of(w, 0, 1);
    c_full = base ^ wm;
    p  = ref_cost(w, prev, base);
    po = ref_cost(w, prev, c_odd);
    pe = ref_cost(w, prev, c_even);
    pf = ref_cost(w, prev, c_full);
    if (scheme == 1) begin
      if (po < p) begin kind = 1; return c_odd; end
      return base;
    end
    if (scheme == 2) begin
      if (po < p && po < pf) begin kind = 1; return c_odd; end
      if (pf < p) begin kind = 3; return c_full; end
      return base;
    end
    // scheme 3: best cost; none kept on ties with it; among inversions of
    // equal cost, full beats even beats odd
    begin
      int best = p;
      if (po < best) best = po;
      if (pe < best) best = pe;
      if (pf < best) best = pf;
      if (best == p) return base;
      if (pf == best) begin kind = 3; return c_full; end
      if (pe == best) begin kind = 2; return c_even; end
      kind = 1;
      return c_odd;
    end
  endfunction

  // Payload bits per body flit for a scheme (0 none, 1 I, 2 II, 3 III).
  function automatic int payload_bits(input int unsigned w, input int scheme);
    return (scheme == 0) ? int'(w) : (scheme == 1) ? int'(w) - 1 : int'(w) - 2;
  endfunction

  // Body flit k of a packet whose n (at most 64) payload words (w bits each, word 0
  // first) are laid end to end, least significant bit first, and cut into
  // pieces of pw bits; the last piece is zero-padded.
  function automatic word_t body_flit(input int unsigned w, input int pw,
                                      input word_t words[64], input int n,
                                      input int k);
    word_t f = '0;
    word_t wd;
    int pos;
    for (int b = 0; b < pw; b++) begin
      pos = k * pw + b;
      if (pos < n * int'(w)) begin
        wd = words[pos / int'(w)];
        f[b] = wd[pos % int'(w)];
      end
    end
    return f;
  endfunction

  function automatic int body_flits(input int unsigned w, input int pw, input int n);
    return (n * int'(w) + pw - 1) / pw;
  endfunction

endpackage
