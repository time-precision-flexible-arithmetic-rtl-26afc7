// tpfau_pkg: types and elaboration-time helpers shared by the time-precision
// flexible arithmetic unit.
//
// Operands of M bits are cut into N = ceil(M/K) blocks of K bits. The adder
// combines block sums in a selection tree of ceil(log2 N) levels; the
// multiplier forms the N*N block products, lays them out in 2N-1 rows (the
// products of one anti-diagonal p = i+j never overlap those of diagonal p+2,
// so even and odd diagonals fill separate rows) and reduces a subset of the
// rows chosen by the number of stages. The functions below give those counts
// and the row placement; they are used only to size and wire the hardware.
package tpfau_pkg;

  typedef enum logic [0:0] {
    OP_ADD = 1'b0,
    OP_MUL = 1'b1
  } op_e;

  // number of K-bit blocks in an M-bit operand
  function automatic int nblocks(input int m, input int k);
    return (m + k - 1) / k;
  endfunction

  // ceil(log2(x)) for x >= 1
  function automatic int clog2i(input int x);
    int r;
    r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction

  // products a_i*b_j with i+j == p, 0 <= i,j < n
  function automatic int diag_count(input int n, input int p);
    if (p < 0 || p > 2 * n - 2) return 0;
    return (p < n) ? p + 1 : 2 * n - 1 - p;
  endfunction

  // rows needed by the diagonals p >= pmin of one parity (par = 0 even, 1 odd)
  function automatic int parity_rows(input int n, input int pmin, input int par);
    int r;
    r = 0;
    for (int p = pmin; p <= 2 * n - 2; p++)
      if ((p % 2) == par && diag_count(n, p) > r) r = diag_count(n, p);
    return r;
  endfunction

  // first diagonal a multiplication with s stages includes: stage 1 keeps
  // only the most significant product, each further stage one more diagonal,
  // and the last stage (s >= n) all of them
  function automatic int stage_pmin(input int n, input int s);
    if (s >= n) return 0;
    return 2 * n - 1 - (s < 1 ? 1 : s);
  endfunction

  // position of product a_i*b_j inside its diagonal
  function automatic int diag_pos(input int n, input int i, input int j);
    int p;
    p = i + j;
    return (p >= n) ? i - (p - n + 1) : i;
  endfunction

  // number of 3:2 counter levels that reduce r rows to two
  function automatic int csa_depth(input int r);
    int d, x;
    d = 0;
    x = r;
    while (x > 2) begin
      x = (x / 3) * 2 + (x % 3);
      d++;
    end
    return d;
  endfunction

  // rows left after l levels of 3:2 counters
  function automatic int csa_rows(input int r, input int l);
    int x;
    x = r;
    for (int i = 0; i < l; i++) if (x > 2) x = (x / 3) * 2 + (x % 3);
    return x;
  endfunction

endpackage
