// scaler_ref_pkg: reference model of the adaptive horizontal scaler, written
// with real arithmetic and plain loops, for the testbenches.
//
// ref_coef   : coefficient of one filter/phase/tap, from the Keys kernel in
//              floating point, rounded half up to 10 fraction bits, with the
//              residue put on the tap nearest the output position.
// ref_edges  : raw edge map, |x[i+1] - x[i-1]| > T with end replication.
// ref_ring   : ringing map, dilation by +-dil XOR edge map.
// ref_line   : the whole output line for L/M, with the filter chosen from the
//              ringing flag of the nearest input pixel.
package scaler_ref_pkg;

  function automatic real keys(real a, real x);
    real ax;
    ax = (x < 0.0) ? -x : x;
    if (ax < 1.0) return (a + 2.0) * ax * ax * ax - (a + 3.0) * ax * ax + 1.0;
    if (ax < 2.0) return a * ax * ax * ax - 5.0 * a * ax * ax + 8.0 * a * ax - 4.0 * a;
    return 0.0;
  endfunction

  function automatic int ref_coef(int sel, int ph, int tap);
    real a, t;
    int  c [4];
    int  s;
    a = (sel != 0) ? 0.0 : -0.75;
    t = real'(ph) / 64.0;
    c[0] = int'($floor(keys(a, 1.0 + t) * 1024.0 + 0.5));
    c[1] = int'($floor(keys(a, t) * 1024.0 + 0.5));
    c[2] = int'($floor(keys(a, 1.0 - t) * 1024.0 + 0.5));
    c[3] = int'($floor(keys(a, 2.0 - t) * 1024.0 + 0.5));
    s = c[0] + c[1] + c[2] + c[3];
    if (ph < 32) c[1] += 1024 - s;
    else         c[2] += 1024 - s;
    return c[tap];
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int absi(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic void ref_edges(input int x[$], input int thr, output bit e[$]);
    int w;
    w = x.size();
    e = {};
    for (int i = 0; i < w; i++)
      e.push_back(absi(x[clampi(i + 1, 0, w - 1)] - x[clampi(i - 1, 0, w - 1)]) > thr);
  endfunction

  function automatic void ref_ring(input bit e[$], input int dil, output bit rg[$]);
    int w;
    bit d;
    w = e.size();
    rg = {};
    for (int i = 0; i < w; i++) begin
      d = 0;
      for (int j = i - dil; j <= i + dil; j++)
        if (j >= 0 && j < w && e[j]) d = 1;
      rg.push_back(d ^ e[i]);
    end
  endfunction

  // y: output pixels, f: filter used (1 = A), kk: input index of each output.
  function automatic void ref_line(input int x[$], input int l, input int m,
                                   input int thr, input int dil,
                                   output int y[$], output int f[$], output int kk[$]);
    bit e[$], rg[$];
    int w, k, r, ph, nr, sel, acc, v;
    w = x.size();
    ref_edges(x, thr, e);
    ref_ring(e, dil, rg);
    y = {}; f = {}; kk = {};
    for (longint mi = 0; ; mi++) begin
      k = int'((mi * m) / l);
      if (k >= w) break;
      r  = int'((mi * m) % l);
      ph = (r * 64) / l;
      nr = clampi((ph >= 32) ? k + 1 : k, 0, w - 1);
      sel = rg[nr] ? 1 : 0;
      acc = 0;
      for (int t = 0; t < 4; t++)
        acc += x[clampi(k - 1 + t, 0, w - 1)] * ref_coef(sel, ph, t);
      v = (acc + 512) >>> 10;
      y.push_back(clampi(v, 0, 255));
      f.push_back(sel);
      kk.push_back(k);
    end
  endfunction

endpackage
