// tb_gf_pkg: reference GF(2^8) arithmetic and Reed-Solomon encoding for the
// testbenches.  It works with exponent/logarithm tables (built once by
// tb_gf_init) and polynomial long division, a different route from the
// shift-and-add multipliers and LFSR of the design, so that the two check
// each other.  Field polynomial 0x11D, generator roots a^0 .. a^(N-K-1).
package tb_gf_pkg;

  int unsigned exp_t[512];
  int unsigned log_t[256];

  function automatic void tb_gf_init();
    int unsigned v;
    v = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i]       = v;
      exp_t[i + 255] = v;
      log_t[v]       = i;
      v = v << 1;
      if ((v & 'h100) != 0) v = v ^ 'h11D;
    end
    exp_t[510] = exp_t[0];
    exp_t[511] = exp_t[1];
  endfunction

  function automatic int unsigned mul(input int unsigned a, input int unsigned b);
    if (a == 0 || b == 0) return 0;
    return exp_t[(log_t[a] + log_t[b]) % 255];
  endfunction

  // Codeword of a message: message bytes first, then the N-K check bytes.
  function automatic void rs_encode(input int n, input int k,
                                    input byte unsigned msg[$],
                                    output byte unsigned cw[$]);
    int unsigned g[$];
    int unsigned rem[$];
    int unsigned f;
    int npar;
    npar = n - k;
    // g(x), g[0] = highest degree coefficient
    g = {1};
    for (int i = 0; i < npar; i++) begin
      int unsigned ng[$];
      ng = {};
      for (int j = 0; j <= g.size(); j++) begin
        int unsigned c;
        c = 0;
        if (j < g.size()) c = g[j];
        if (j > 0) c = c ^ mul(g[j-1], exp_t[i]);
        ng.push_back(c);
      end
      g = ng;
    end
    rem = {};
    for (int j = 0; j < npar; j++) rem.push_back(0);
    for (int i = 0; i < k; i++) begin
      f = 32'(msg[i]) ^ rem[0];
      for (int j = 0; j < npar - 1; j++) rem[j] = rem[j+1] ^ mul(f, g[j+1]);
      rem[npar-1] = mul(f, g[npar]);
    end
    cw = {};
    for (int i = 0; i < k; i++) cw.push_back(msg[i]);
    for (int j = 0; j < npar; j++) cw.push_back(byte'(rem[j]));
  endfunction

  // True when all N-K syndromes of the received word are zero.
  function automatic bit rs_is_codeword(input int n, input int k,
                                        input byte unsigned cw[$]);
    for (int j = 0; j < n - k; j++) begin
      int unsigned s;
      s = 0;
      for (int i = 0; i < n; i++) s = mul(s, exp_t[j]) ^ 32'(cw[i]);
      if (s != 0) return 0;
    end
    return 1;
  endfunction

endpackage
