// tb_bch_pkg: reference arithmetic for the decoder testbenches.
//
// A table-based GF(2^13) (exp/log tables built from x^13 + x^4 + x^3 + x + 1), the
// generator polynomial of the binary BCH code with designed distance 2T+1 (product
// of the minimal polynomials of alpha^1..alpha^2T), a systematic BCH encoder
// (parity in positions 0..N-K-1, message bit m at position N-K+m) and polynomial
// evaluation. Written independently of the RTL's gf_pkg.
package tb_bch_pkg;

  localparam int Q = 8191;
  int exp_t [0:2*Q];
  int log_t [0:Q];

  function automatic void init_tables();
    int a;
    a = 1;
    for (int i = 0; i < 2 * Q + 1; i++) begin
      exp_t[i] = a;
      if (i < Q) log_t[a] = i;
      a = a << 1;
      if (a & 32'h2000) a = a ^ 32'h201B;
    end
  endfunction

  function automatic int fmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int falpha(int e);
    return exp_t[((e % Q) + Q) % Q];
  endfunction

  // Evaluate sum_j c[j] x^j.
  function automatic int feval(int c[], int x);
    int acc;
    acc = 0;
    for (int j = c.size() - 1; j >= 0; j--) acc = fmul(acc, x) ^ c[j];
    return acc;
  endfunction

  // Binary BCH generator polynomial, coefficients g[0..deg].
  function automatic void bch_generator(int t, ref bit g[$]);
    bit root [int];
    int c [];
    int e;
    for (int j = 1; j <= 2 * t; j++) begin
      e = j;
      do begin
        root[e] = 1;
        e = (2 * e) % Q;
      end while (e != j);
    end
    c = new[1];
    c[0] = 1;
    foreach (root[r]) begin
      int nc [];
      nc = new[c.size() + 1];
      foreach (nc[k]) nc[k] = 0;
      foreach (c[k]) begin
        nc[k + 1] ^= c[k];
        nc[k] ^= fmul(c[k], falpha(r));
      end
      c = nc;
    end
    g.delete();
    foreach (c[k]) begin
      if (c[k] > 1) $fatal(1, "BCH generator is not binary");
      g.push_back(c[k][0]);
    end
  endfunction

  // Systematic encoding: cw[N-K+m] = msg[m], cw[0..N-K-1] = x^(N-K) m(x) mod g(x).
  function automatic void bch_encode(int n, int k, bit g[$], bit msg[], ref bit cw[]);
    bit par [];
    bit fb;
    int np;
    np = n - k;
    par = new[np];
    foreach (par[i]) par[i] = 0;
    for (int m = k - 1; m >= 0; m--) begin
      fb = msg[m] ^ par[np-1];
      for (int i = np - 1; i >= 1; i--) par[i] = par[i-1] ^ (fb & g[i]);
      par[0] = fb & g[0];
    end
    cw = new[n];
    for (int i = 0; i < np; i++) cw[i] = par[i];
    for (int m = 0; m < k; m++) cw[np+m] = msg[m];
  endfunction

endpackage
