// tpfau_flex_adder: time-precision flexible adder (TLA, table look-up adder).
//
// The M-bit operands are cut into N = ceil(M/K) blocks of K bits (the top
// block zero-padded). One access to the compound LUT-adder returns every
// block's sum and successor, the selection tree joins them level by level,
// and an output multiplexer picks the result after `levels` tree levels:
//   levels = 0            block sums concatenated, inter-block carries dropped
//   0 < levels < L        groups of 2^levels blocks exact, carries between
//                         groups dropped
//   levels >= L           exact sum (L = ceil(log2 N))
// Each choice is its own combinational path (LUT + mux, LUT + and-or + mux,
// ...), so fewer levels give a shorter path and a less precise sum.
//
// Interface: a, b, levels in; sum (M bits) and cout out. Combinational.
module tpfau_flex_adder
  import tpfau_pkg::*;
#(
  parameter int M = 32,
  parameter int K = 8,
  localparam int N  = nblocks(M, K),
  localparam int L  = clog2i(N),
  localparam int LW = (clog2i(L + 1) < 1) ? 1 : clog2i(L + 1)
) (
  input  logic [M-1:0]  a,
  input  logic [M-1:0]  b,
  input  logic [LW-1:0] levels,
  output logic [M-1:0]  sum,
  output logic          cout
);

  localparam int W = N * K;

  logic [W-1:0] ap, bp;
  logic [K-1:0] ablk [N];
  logic [K-1:0] bblk [N];
  logic [K:0]   t0   [N];
  logic [K:0]   t1   [N];
  logic [K-1:0] s0   [N];
  logic [K-1:0] s1   [N];
  logic [N-1:0] c0, c1;
  logic [W:0]   res  [L+1];
  logic [W:0]   sel;

  // fragmentation of the operands into blocks
  assign ap = W'(a);
  assign bp = W'(b);
  for (genvar i = 0; i < N; i++) begin : g_blk
    assign ablk[i] = ap[i*K +: K];
    assign bblk[i] = bp[i*K +: K];
    assign s0[i]   = t0[i][K-1:0];
    assign s1[i]   = t1[i][K-1:0];
    assign c0[i]   = t0[i][K];
    assign c1[i]   = t1[i][K];
  end

  tpfau_lut_adder #(.K(K), .NPORTS(N)) u_lut (
    .a(ablk), .b(bblk), .sum0(t0), .sum1(t1)
  );

  tpfau_tree_select #(.K(K), .N(N)) u_tree (
    .s0(s0), .s1(s1), .c0(c0), .c1(c1), .res(res)
  );

  // output selection by the number of tree levels
  always_comb begin
    sel = res[L];
    for (int l = 0; l < L; l++)
      if (32'(levels) == l) sel = res[l];
  end

  // with a padded top block the carry out is bit M of the padded sum
  assign {cout, sum} = sel[M:0];

endmodule
