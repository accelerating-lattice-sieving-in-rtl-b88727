// sieve_ref_pkg: reference model of Reduce(v, u) for the testbenches.
// Works on integer arrays with plain arithmetic (true division and rounding,
// no comparison table), so it is independent of the hardware's method.
package sieve_ref_pkg;

  typedef struct {
    bit     reduced;
    bit     sat;
    bit     ovf;
    int     q;
    longint dot;
    longint norm;   // new squared norm, recomputed from the new coordinates
    int     v[];    // new coordinates, wrapped to w bits
  } reduce_res_t;

  function automatic longint norm2(input int x[]);
    longint s = 0;
    foreach (x[i]) s += longint'(x[i]) * x[i];
    return s;
  endfunction

  function automatic int wrap(input int x, input int w);
    int m;
    m = x & ((1 << w) - 1);
    if (m >= (1 << (w - 1))) m -= (1 << w);
    return m;
  endfunction

  // Rounded quotient, half away from zero, clamped to +-4.
  function automatic reduce_res_t reduce_ref(input int v[], input int u[], input int w);
    reduce_res_t r;
    longint nu, ad, m;
    nu = norm2(u);
    r.dot = 0;
    foreach (v[i]) r.dot += longint'(v[i]) * u[i];
    ad = (r.dot < 0) ? -r.dot : r.dot;
    r.reduced = (nu != 0) && (2 * ad > nu);
    m = r.reduced ? (2 * ad + nu) / (2 * nu) : 0;
    r.sat = r.reduced && (m > 4);
    if (m > 4) m = 4;
    r.q = (r.dot < 0) ? -int'(m) : int'(m);
    r.v = new[v.size()];
    r.ovf = 0;
    r.norm = 0;
    foreach (v[i]) begin
      int full;
      full = v[i] - r.q * u[i];
      r.v[i] = wrap(full, w);
      if (r.reduced && full != r.v[i]) r.ovf = 1;
      r.norm += longint'(full) * full;
    end
    return r;
  endfunction

  // Model of the on-chip set sieving: each pass is a sweep per reducer j,
  // reducing every set[i], i != j, with 0 < ||set[j]|| <= ||set[i]||, by
  // set[j]; passes repeat until one reduces nothing. With a budget (0 = no
  // limit) the run stops before the first sweep that starts with at least
  // `budget` reductions done; a pass cut short is not counted.
  task automatic sieve_ref(ref int set[$][], input int k, input int budget, input int w,
                           output int red, output int issued, output int npass);
    bit any, cut;
    longint nrm[];
    cut = 0; red = 0; issued = 0; npass = 0;
    nrm = new[k];
    for (int i = 0; i < k; i++) nrm[i] = norm2(set[i]);
    do begin
      any = 0;
      for (int j = 0; j < k; j++) begin
        if (budget != 0 && red >= budget) begin cut = 1; break; end
        for (int i = 0; i < k; i++)
          if (i != j && nrm[j] != 0 && nrm[j] <= nrm[i]) begin
            reduce_res_t r;
            r = reduce_ref(set[i], set[j], w);
            issued++;
            if (r.reduced) begin set[i] = r.v; nrm[i] = r.norm; red++; any = 1; end
          end
      end
      if (!cut) npass++;
    end while (!cut && any);
  endtask

endpackage
