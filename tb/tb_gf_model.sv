// tb_gf_model: reference Galois-field and Reed-Solomon arithmetic for the
// testbenches. Uses log/antilog tables built by iterating alpha = x, which is
// a different method from the RTL's shift-and-reduce multiplier, plus a
// systematic RS encoder (polynomial division by the generator) and direct
// syndrome/polynomial evaluation.
package tb_gf_model;

  int unsigned exp8 [0:509];
  int unsigned log8 [0:255];
  int unsigned exp7 [0:253];
  int unsigned log7 [0:127];

  function automatic void build();
    int unsigned v;
    v = 1;
    for (int i = 0; i < 255; i++) begin
      exp8[i] = v; exp8[i+255] = v; log8[v] = i;
      v = v << 1; if (v & 'h100) v ^= 'h11D;
    end
    v = 1;
    for (int i = 0; i < 127; i++) begin
      exp7[i] = v; exp7[i+127] = v; log7[v] = i;
      v = v << 1; if (v & 'h80) v ^= 'h89;
    end
  endfunction

  function automatic int unsigned q(bit f7);  return f7 ? 127 : 255; endfunction

  function automatic int unsigned mul(int unsigned a, int unsigned b, bit f7);
    if (a == 0 || b == 0) return 0;
    return f7 ? exp7[log7[a] + log7[b]] : exp8[log8[a] + log8[b]];
  endfunction

  function automatic int unsigned apow(int e, bit f7);
    int m;
    m = int'(q(f7));
    e = ((e % m) + m) % m;
    return f7 ? exp7[e] : exp8[e];
  endfunction

  function automatic int unsigned inv(int unsigned a, bit f7);
    return f7 ? exp7[127 - log7[a]] : exp8[255 - log8[a]];
  endfunction

  // Evaluate polynomial p (coefficient i of x^i) at x.
  function automatic int unsigned peval(int unsigned p[], int unsigned x, bit f7);
    int unsigned acc, xp;
    acc = 0; xp = 1;
    foreach (p[i]) begin
      acc ^= mul(p[i], xp, f7);
      xp = mul(xp, x, f7);
    end
    return acc;
  endfunction

  // Annex-B extension symbol: appended after the 127-symbol codeword, taken
  // here as the codeword evaluated at alpha^0 (the sum of its symbols). The
  // decoder does not use its value.
  function automatic void extend(ref int unsigned cw[]);
    int unsigned s = 0;
    foreach (cw[i]) s ^= cw[i];
    cw = new[cw.size() + 1](cw);
    cw[cw.size() - 1] = s;
  endfunction

  // Systematic encoder. msg[0] is sent first; returns codeword in sent order
  // (cw[0] is the coefficient of x^(n-1)).
  function automatic void encode(int unsigned msg[], int n, int t, int b, bit f7,
                                 ref int unsigned cw[]);
    int unsigned g[], par[];
    int k, np;
    np = 2 * t;
    k  = n - np;
    g = new[np + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int r = 0; r < np; r++) begin
      // g = g * (x + alpha^(b+r))
      for (int i = np; i >= 0; i--)
        g[i] = (i > 0 ? g[i-1] : 0) ^ mul(g[i], apow(b + r, f7), f7);
    end
    par = new[np];
    foreach (par[i]) par[i] = 0;
    for (int i = 0; i < k; i++) begin
      int unsigned fb;
      fb = msg[i] ^ par[np-1];
      for (int j = np - 1; j > 0; j--) par[j] = par[j-1] ^ mul(fb, g[j], f7);
      par[0] = mul(fb, g[0], f7);
    end
    cw = new[n];
    for (int i = 0; i < k; i++) cw[i] = msg[i];
    for (int j = 0; j < np; j++) cw[k + j] = par[np - 1 - j];
  endfunction

  // Syndrome S_(b+j) of a received word in sent order.
  function automatic int unsigned synd(int unsigned r[], int j, int b, bit f7);
    int unsigned acc;
    int n;
    n = r.size();
    acc = 0;
    for (int i = 0; i < n; i++) acc ^= mul(r[i], apow((b + j) * (n - 1 - i), f7), f7);
    return acc;
  endfunction

endpackage
