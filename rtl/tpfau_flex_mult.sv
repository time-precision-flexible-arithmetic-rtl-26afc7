// tpfau_flex_mult: time-precision flexible multiplier (LUT-product multiplier).
//
// The M-bit operands are cut into N = ceil(M/K) blocks. One access to the
// LUT-multiplier returns all N*N block products a_i*b_j (2K bits each, weight
// 2^(K(i+j))). Products of diagonal p = i+j and p+2 do not overlap, so the
// products are laid out in 2N-1 rows: the even diagonals fill the first rows,
// the odd diagonals the rest, each product in the row given by its position in
// its diagonal.
//
// The number of stages s (1..N) sets how many diagonals, from the most
// significant down, enter the result; each choice has its own path:
//   s = 1      the top product a_{N-1}*b_{N-1} goes straight to the output mux
//   1 < s < N  the s top diagonals, packed in as few rows as they need, are
//              reduced by their own 3:2 tree (N=4: s=2 -> 3 rows, 1 level;
//              s=3 -> 5 rows, 3 levels)
//   s >= N     all 2N-1 rows (N=4: 7 rows, 4 levels), exact product
// The two rows of the chosen tree go through one multiplexer to a shared
// final carry-propagate adder, then to the output multiplexer. The final
// adder is a plain binary adder: the source leaves its method open.
//
// Interface: a, b, stages in; prod (2M bits) out. Combinational. stages = 0 is
// treated as 1.
module tpfau_flex_mult
  import tpfau_pkg::*;
#(
  parameter int M = 32,
  parameter int K = 8,
  localparam int N  = nblocks(M, K),
  localparam int SW = clog2i(N + 1)
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  input  logic [SW-1:0]  stages,
  output logic [2*M-1:0] prod
);

  localparam int W  = N * K;       // padded operand width
  localparam int W2 = 2 * W;       // product width

  logic [W-1:0]   ap, bp;
  logic [K-1:0]   la   [N*N];
  logic [K-1:0]   lb   [N*N];
  logic [2*K-1:0] pp   [N*N];      // pp[i*N+j] = a_i * b_j
  logic [W2-1:0]  red_s [N+1];     // reduced row pairs, per stage count
  logic [W2-1:0]  red_c [N+1];
  logic [W2-1:0]  fin_s, fin_c, fin, top_only, full;

  assign ap = W'(a);
  assign bp = W'(b);
  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = 0; j < N; j++) begin : g_j
      assign la[i*N+j] = ap[i*K +: K];
      assign lb[i*N+j] = bp[j*K +: K];
    end
  end

  tpfau_lut_mult #(.K(K), .NPORTS(N*N)) u_lut (
    .a(la), .b(lb), .prod(pp)
  );

  // first selection: the most significant product alone
  assign top_only = W2'(pp[N*N-1]) << (2 * (N - 1) * K);

  assign red_s[0] = '0;
  assign red_c[0] = '0;
  assign red_s[1] = top_only;
  assign red_c[1] = '0;

  // one row layout and reduction tree per stage count
  for (genvar s = 2; s <= N; s++) begin : g_stage
    localparam int PMIN = stage_pmin(N, s);
    localparam int E    = parity_rows(N, PMIN, 0);
    localparam int O    = parity_rows(N, PMIN, 1);
    localparam int R    = E + O;
    logic [W2-1:0] rows [R];

    always_comb begin
      for (int r = 0; r < R; r++) rows[r] = '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (i + j >= PMIN)
            rows[((i + j) % 2 == 0) ? diag_pos(N, i, j) : E + diag_pos(N, i, j)]
                [(i+j)*K +: 2*K] = pp[i*N+j];
    end

    tpfau_csa_tree #(.R(R), .W(W2)) u_csa (
      .rows(rows), .sum_row(red_s[s]), .carry_row(red_c[s])
    );
  end

  // mux of the row pair, shared final adder, output mux
  always_comb begin
    fin_s = red_s[N];
    fin_c = red_c[N];
    for (int s = 2; s < N; s++)
      if (32'(stages) == s) begin
        fin_s = red_s[s];
        fin_c = red_c[s];
      end
  end

  assign fin  = fin_s + fin_c;
  assign full = (N > 1 && stages > SW'(1)) ? fin : top_only;
  assign prod = full[2*M-1:0];

endmodule
