// decim_ref_pkg -- sample-by-sample reference model of the decimator, for
// the testbenches. It follows the arithmetic of the design bit for bit
// (formats in decim_pkg) but is written serially, one sample and one output
// at a time, with 64-bit integers, so it shares no structure with the
// parallel RTL: no lanes, no packing, no pipelining. rnd selects the
// rounding variant (RND_TRUNC, RND_LAST, RND_ALL from decim_pkg).
package decim_ref_pkg;
  import decim_pkg::*;

  typedef longint q_t[$];

  // Sign-extend the low w bits of v.
  function automatic longint wrap(longint v, int w);
    longint m;
    m = (64'sd1 <<< w) - 1;
    v = v & m;
    if (v >= (64'sd1 <<< (w-1))) v = v - (64'sd1 <<< w);
    return v;
  endfunction

  function automatic longint clamp(longint v, int w);
    longint hi, lo;
    hi = (64'sd1 <<< (w-1)) - 1;
    lo = -(64'sd1 <<< (w-1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // v / 2^s, rounded half up when rnd is set, else truncated (floor).
  function automatic longint rsh(longint v, int s, bit rnd);
    return rnd ? (v + (64'sd1 <<< (s - 1))) >>> s : v >>> s;
  endfunction

  // u_m = x (2mu-1)^m for one sample; mu is Q0.16.
  function automatic void ref_u(input longint x, input longint mu, output longint u[NBR],
                                input int rnd = RND_LAST);
    longint c;
    c = mu - 32768;                       // 2mu - 1 in Q1.15
    u[0] = x * 2048;                      // Q1.15 -> Q1.26
    for (int m = 1; m < int'(NBR); m++)
      u[m] = clamp(rsh(u[m-1] * c, 15, rnd == RND_ALL), U_W);
  endfunction

  // Integrate and dump: returns the branch sums v[m] of every completed
  // output interval. Sample k = 1.. has mu_k = frac(k r / 2^16).
  function automatic void ref_accumulate(input q_t x, input longint r, input int shift,
                                         output q_t v [NBR], input int rnd = RND_LAST);
    longint mu, s, acc[NBR], u[NBR];
    for (int m = 0; m < int'(NBR); m++) begin acc[m] = 0; v[m] = {}; end
    mu = 0;
    foreach (x[k]) begin
      s  = mu + r;
      mu = s % 65536;
      ref_u(x[k], mu, u, rnd);
      for (int m = 0; m < int'(NBR); m++) begin
        longint t;
        t = rsh(u[m] <<< V_G, shift + 1, rnd == RND_ALL);
        if (s >= 65536) begin
          v[m].push_back(wrap(rsh(acc[m], V_G, rnd == RND_ALL), V_W));
          acc[m] = t;
        end else begin
          acc[m] = wrap(acc[m] + t, VA_W);
        end
      end
    end
  endfunction

  // p(l, n) = sum_m c_m(n) v_m(l), truncated to Q5.25.
  function automatic longint ref_p(input q_t v [NBR], input int l, input int n,
                                   input int rnd = RND_LAST);
    longint s;
    if (l < 0) return 0;
    s = 0;
    for (int m = 0; m < int'(NBR); m++) s += v[m][l] * longint'(farrow_coef(m, n));
    return wrap(rsh(s, 15, rnd == RND_ALL), P_W);
  endfunction

  // Transposed Farrow output y(l) = sum_n p(l-7+n, n), saturated to F_W.
  function automatic q_t ref_farrow(input q_t v [NBR], input int rnd = RND_LAST);
    q_t y;
    for (int l = 0; l < v[0].size(); l++) begin
      longint s;
      s = 0;
      for (int n = 0; n < int'(NTAP); n++) s += ref_p(v, l - int'(NTAP) + 1 + n, n, rnd);
      y.push_back(clamp(s, F_W));
    end
    return y;
  endfunction

  function automatic longint ref_scale(input longint y, input longint sf,
                                       input int rnd = RND_LAST);
    return clamp(rsh(y * sf, 20, rnd == RND_ALL), HB_W);
  endfunction

  // Halfband decimation by 2 of s (Q2.22), zero history, rounded to Q1.15.
  // The delay branch starts with output word 3 (outputs 12..).
  function automatic q_t ref_halfband(input q_t s, input int rnd = RND_LAST);
    q_t out;
    for (int q = 0; 2*q + 1 < s.size(); q++) begin
      longint acc;
      acc = 0;
      for (int i = 0; i < int'(HB_NODD); i++)
        if (q - i >= 0) acc += longint'(hb_coef(i)) * s[2*(q-i)];
      if (q >= 12) acc += s[2*(q-12)+1] * 16384;
      out.push_back(clamp(rsh(acc, 22, rnd != RND_TRUNC), DATA_W));
    end
    return out;
  endfunction

  // Settings for a Farrow decimation factor R (total decimation 2R).
  function automatic void settings(input real R, output longint r, output int d,
                                   output longint sf);
    real reff;
    r = longint'(65536.0 / R);
    reff = 65536.0 / real'(r);
    d = 0;
    while ((2.0 ** d) < reff - 1e-9) d++;
    sf = longint'((2.0 ** (17 + d)) / reff);
    if (sf > 262143) sf = 262143;
  endfunction
endpackage
