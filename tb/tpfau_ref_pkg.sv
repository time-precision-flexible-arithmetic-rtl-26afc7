// tpfau_ref_pkg: reference arithmetic for the testbenches of the flexible
// arithmetic unit, written directly from the definition of each precision
// level rather than from the hardware structure. Operands up to 128 bits.
package tpfau_ref_pkg;

  typedef logic [255:0] wide_t;

  function automatic int ref_nblocks(input int m, input int k);
    return (m + k - 1) / k;
  endfunction

  function automatic int ref_levels(input int n);
    int l;
    l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  function automatic wide_t lowmask(input int w);
    return (wide_t'(1) << w) - 1;
  endfunction

  // Sum after lev tree levels: groups of 2^lev blocks are added exactly, no
  // carry passes between groups; returns {carry out, sum} in bits [m:0].
  function automatic wide_t ref_add(input wide_t a, input wide_t b,
                                    input int m, input int k, input int lev);
    int n, gw, w, lo, width;
    wide_t res, x, y, t, cout;
    n = ref_nblocks(m, k);
    w = n * k;
    if (lev > ref_levels(n)) lev = ref_levels(n);
    gw = k << lev;
    res = '0;
    cout = '0;
    for (lo = 0; lo < w; lo += gw) begin
      width = (w - lo < gw) ? w - lo : gw;
      x = (a >> lo) & lowmask(width);
      y = (b >> lo) & lowmask(width);
      t = x + y;
      res |= (t & lowmask(width)) << lo;
      cout = (t >> width) & 1;
    end
    res |= cout << w;
    return res & lowmask(m + 1);
  endfunction

  // Product keeping the s most significant block-product diagonals (all of
  // them when s >= n); 2m bits.
  function automatic wide_t ref_mul(input wide_t a, input wide_t b,
                                    input int m, input int k, input int s);
    int n, pmin;
    wide_t acc, ai, bj;
    n = ref_nblocks(m, k);
    if (s < 1) s = 1;
    pmin = (s >= n) ? 0 : 2 * n - 1 - s;
    acc = '0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i + j >= pmin) begin
          ai = (a >> (i * k)) & lowmask(k);
          bj = (b >> (j * k)) & lowmask(k);
          acc += (ai * bj) << ((i + j) * k);
        end
    return acc & lowmask(2 * m);
  endfunction

  // stage count for a speed code with thresholds t0 < t1 < t2 (four stages)
  function automatic int ref_stages(input int speed);
    if (speed < 32) return 4;
    if (speed < 64) return 3;
    if (speed < 96) return 2;
    return 1;
  endfunction

endpackage
