// sova_ref_pkg: behavioural reference of the SOVA decoders for the
// testbenches.
//
// The model keeps the whole history of decisions and metric differences and
// computes every output directly from the algorithm, with explicit
// tracebacks instead of register exchanges:
//   * ML state at step m: trace back L steps from state 0 at step m+L;
//   * for merges m = p .. p+M-1 on the ML path, trace both competing paths
//     back to step p; where their decisions differ, the bit's reliability
//     becomes min(reliability, delta of the merge), starting from 63;
//   * the hard bit is the ML path's decision at step p.
// Path metrics are unbounded integers. Branch metric formulas are written
// out again here from their definitions. Step indices count clock cycles
// after reset; step() is called once per cycle with the branch metrics the
// datapath sees in that cycle, out_at(c) gives the expected output in cycle
// c (latency L+M+2 from the datapath's decision stream).
package sova_ref_pkg;
  import sova_pkg::*;

  function automatic int epr4_bm(int y, int ap_hard, int ap_mag, int s, int u,
                                 int unit, int shift);
    int a3, a2, a1, a0, d, e, sq;
    a0 = u ? 1 : -1;              // x(n)
    a1 = ((s >> 2) & 1) ? 1 : -1; // x(n-1)
    a2 = ((s >> 1) & 1) ? 1 : -1; // x(n-2)
    a3 = (s & 1) ? 1 : -1;        // x(n-3)
    d  = a0 + a1 - a2 - a3;
    e  = y - unit * d;
    sq = (e * e) / (1 << shift);
    if (sq > 127) sq = 127;
    if (ap_hard != u) sq += ap_mag;
    if (sq > 127) sq = 127;
    return sq;
  endfunction

  function automatic int c1113_bm(int h0, int m0, int e0, int h1, int m1, int e1,
                                  int s, int u);
    int c0, c1, b;
    c0 = u ^ (s & 1);
    c1 = u ^ ((s >> 1) & 1) ^ (s & 1);
    b = 0;
    if (!e0 && c0 != h0) b += m0;
    if (!e1 && c1 != h1) b += m1;
    return (b > 127) ? 127 : b;
  endfunction

  class sova_ref #(int L = 15, int M = 15, int T = 4096);
    longint pm [8][2];     // partial sums sm + bm of each branch
    bit     dec [T][8];
    int     dlt [T][8];
    int     c;             // steps done
    // coverage of the reliability update
    int     n_min_taken, n_eq_skip, n_delta_sat;

    function new();
      foreach (pm[s, u]) pm[s][u] = 0;
      foreach (dec[t, s]) begin dec[t][s] = 0; dlt[t][s] = 0; end
      c = 0;
      n_min_taken = 0; n_eq_skip = 0; n_delta_sat = 0;
    endfunction

    static function int pred(int i, int d);
      return ((i & 3) << 1) | d;
    endfunction

    // bm[s][u] as seen in cycle c
    function void step(int bm [8][2]);
      longint npm [8][2];
      for (int i = 0; i < 8; i++) begin
        int u = (i >> 2) & 1;
        longint a = pm[pred(i, 0)][u];
        longint b = pm[pred(i, 1)][u];
        bit sel = (a > b);
        longint mn = sel ? b : a;
        longint df = (a > b) ? a - b : b - a;
        dec[c + 1][i] = sel;
        dlt[c + 1][i] = (df > 63) ? 63 : int'(df);
        npm[i][0] = mn + bm[i][0];
        npm[i][1] = mn + bm[i][1];
      end
      pm = npm;
      c++;
    endfunction

    function int ml_state(int m);
      int st;
      st = 0;
      for (int t = m + L; t > m; t--) begin
        bit dd;
        dd = dec[t][st];
        st = ((st & 3) << 1) | (dd ? 1 : 0);
      end
      return st;
    endfunction

    // decision at step p on the path that is in state s at step m (m >= p)
    function bit trace_dec(int s, int m, int p);
      int st;
      st = s;
      for (int t = m; t > p; t--) begin
        bit dd;
        dd = dec[t][st];
        st = ((st & 3) << 1) | (dd ? 1 : 0);
      end
      return dec[p][st];
    endfunction

    function soft_t out_at(int cyc);
      soft_t o;
      int p = cyc - L - M - 2;
      int r = 63;
      int ip = ml_state(p);
      o.hard = dec[p][ip];
      for (int j = 1; j <= M; j++) begin
        int m  = p + j - 1;
        int im = ml_state(m);
        int dd = dlt[m][im];
        bit eq;
        if (j == 1) eq = 0;
        else eq = (trace_dec(pred(im, 0), m - 1, p) == trace_dec(pred(im, 1), m - 1, p));
        if (dd == 63) n_delta_sat++;
        if (!eq && dd < r) begin r = dd; n_min_taken++; end
        else if (eq && dd < r) n_eq_skip++;
      end
      o.mag = mag_t'(r);
      return o;
    endfunction
  endclass

endpackage
