// corr_ref_pkg: reference model for the correlator testbenches.
//
// Computes the 110 result words of one element directly from the list of
// samples, without any delay line: stage s sees the samples summed in
// complete, non-overlapping bins of 2^(s-1) samples starting at the first
// one, and for each lag k (in bins) G = sum y[j]*y[j-k], intp = sum y[j-k]
// and intf = sum y[j] over all j with both bins present. Word order as in
// cor_pkg. LAG_BASE selects the tap numbering (1: lags 1..8 and 5..8,
// 0: lags 0..7 and 4..7).
package corr_ref_pkg;
  import cor_pkg::*;

  typedef longint unsigned u64_t;
  typedef u64_t words_t [NWORDS];

  function automatic words_t ref_words(input int unsigned xs[$], input int lag_base);
    words_t w;
    int unsigned m = xs.size();
    for (int i = 0; i < NWORDS; i++) w[i] = 0;
    for (int s = 1; s <= NSTAGE; s++) begin
      int b  = 1 << (s - 1);
      int n  = m / b;
      int nl = stage_nlag(s);
      int k0 = (s == 1) ? lag_base : 4 + lag_base;
      u64_t y[$];
      for (int j = 0; j < n; j++) begin
        u64_t sum = 0;
        for (int i = 0; i < b; i++) sum += xs[j*b + i];
        y.push_back(sum);
      end
      for (int l = 0; l < nl; l++) begin
        int k = k0 + l;
        u64_t g = 0, p = 0, f = 0;
        for (int j = k; j < n; j++) begin
          g += y[j] * y[j-k];
          p += y[j-k];
          f += y[j];
        end
        w[addr_g(s, l)]    = g;
        w[addr_intp(s, l)] = p;
        w[addr_intf(s, l)] = f;
      end
    end
    w[WORD_TERM] = m;
    for (int i = 0; i < m; i++) w[WORD_INTC] += xs[i];
    return w;
  endfunction

endpackage
