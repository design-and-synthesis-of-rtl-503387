// da_lms_model_pkg: bit-exact reference model of the DA LMS adaptive filter,
// written from the algorithm rather than from the RTL, for the testbenches.
//
// step(s, d) filters the newest sample s = s(k) against the partial-product
// table, forms e(k) = d(k) - y(k) and applies the update
//     P[A_j] += 2^-MU * e * F_j,  F = [-2^0, 2^-1, ..., 2^-(B-1)],
// slice by slice from j = B-1 down to 0, saturating each word to PW bits.
// A_j is the address made of bit b_j of s(k), s(k-1), ..., s(k-N+1), where
// b_0 is the sign bit. y and e are kept with PFRAC fraction bits; y_out and
// e_out are the DW-bit saturated values the hardware presents.
package da_lms_model_pkg;

  class da_lms_model #(int N = 16, int B = 16, int DW = 16, int PW = 24,
                       int PFRAC = 20, int MU = 1);
    longint p [];
    longint hist [];
    longint y_full, e_full;
    longint y_out, e_out;
    int     dup_slices;    // update slices whose address repeated one already used
    int     sat_events;    // partial-product updates that saturated

    function new();
      p    = new[1 << N];
      hist = new[N];
      foreach (p[i])    p[i] = 0;
      foreach (hist[i]) hist[i] = 0;
      dup_slices = 0;
      sat_events = 0;
    endfunction

    function automatic longint sext(longint v, int w);
      longint m = longint'(1) << (w - 1);
      v = v & ((longint'(1) << w) - 1);
      return (v ^ m) - m;
    endfunction

    function automatic longint sat(longint v, int w);
      longint hi = (longint'(1) << (w - 1)) - 1;
      longint lo = -(longint'(1) << (w - 1));
      if (v > hi) return hi;
      if (v < lo) return lo;
      return v;
    endfunction

    function automatic int addr(int j);
      int a = 0;
      for (int m = 0; m < N; m++)
        if (((hist[m] >> (B - 1 - j)) & 1) != 0) a |= (1 << m);
      return a;
    endfunction

    // Filters s = s(k) and adapts with d = d(k). Returns y(k) (PFRAC bits).
    function automatic void step(longint s, longint d);
      longint acc;
      int     used [$];
      longint delta, sum;
      int     a;
      for (int m = N - 1; m > 0; m--) hist[m] = hist[m-1];
      hist[0] = sext(s, B);
      acc = 0;
      for (int j = 0; j < B; j++) begin
        a = addr(j);
        if (j == 0) acc -= p[a] * (longint'(1) << (B - 1));
        else        acc += p[a] * (longint'(1) << (B - 1 - j));
      end
      y_full = acc >>> (B - 1);
      e_full = (sext(d, DW) * (longint'(1) << (PFRAC - DW + 1))) - y_full;
      y_out  = sat(y_full >>> (PFRAC - DW + 1), DW);
      e_out  = sat(e_full >>> (PFRAC - DW + 1), DW);
      for (int j = B - 1; j >= 0; j--) begin
        a = addr(j);
        foreach (used[u]) if (used[u] == a) begin dup_slices++; break; end
        used.push_back(a);
        delta = (j == 0) ? -(e_full >>> MU) : (e_full >>> (j + MU));
        sum   = p[a] + delta;
        p[a]  = sat(sum, PW);
        if (p[a] != sum) sat_events++;
      end
    endfunction
  endclass

endpackage
