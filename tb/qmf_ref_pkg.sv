// qmf_ref_pkg: bit-true reference model of the QMF channelizer for the testbenches.
//
// Written directly from the filter definition, not from the RTL structure: the parent
// filter is the list of its nine integer coefficients (scaled by 2^16), a truncated
// filter is the central 9 - 2*trim of them, the low band is sum h(k) x(n-k), the high
// band sum (-1)^k h(k) x(n-k) (k counted from the first kept tap), each rounded half up
// from 16 fractional bits and saturated to w bits, and decimation keeps the outputs at
// even input indices. A tree is built by applying that to every subband.
package qmf_ref_pkg;

  localparam longint COEF [0:8] = '{652, 3909, -2994, 20864, 32768, 20864, -2994, 3909, 652};

  function automatic longint rsat(longint acc, int w);
    longint r, mx, mn;
    r  = (acc + 64'sd32768) >>> 16;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    if (r > mx) return mx;
    if (r < mn) return mn;
    return r;
  endfunction

  // full-rate filter outputs for input index n (earlier inputs count as zero)
  function automatic void qmf_at(input longint xs[$], input int n, input int trim, input int w,
                                 output longint lo, output longint hi, output bit sat);
    longint e, o, v;
    int kk;
    e = 0;
    o = 0;
    for (int k = trim; k <= 8 - trim; k++) begin
      kk = k - trim;
      if (n - kk >= 0) begin
        v = COEF[k] * xs[n - kk];
        if (kk % 2 == 0) e += v;
        else             o += v;
      end
    end
    lo  = rsat(e + o, w);
    hi  = rsat(e - o, w);
    sat = (lo != ((e + o + 64'sd32768) >>> 16)) || (hi != ((e - o + 64'sd32768) >>> 16));
  endfunction

  // one analysis bank: filter then keep even indices
  function automatic void analysis(input longint xs[$], input int trim, input int w,
                                   output longint lo[$], output longint hi[$]);
    longint l, h;
    bit s;
    lo = {};
    hi = {};
    for (int n = 0; n < xs.size(); n += 2) begin
      qmf_at(xs, n, trim, w, l, h, s);
      lo.push_back(l);
      hi.push_back(h);
    end
  endfunction

endpackage
