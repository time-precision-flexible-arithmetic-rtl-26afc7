// tpfau_tree_select: carry-select selection tree of the flexible adder.
//
// Input: for each of the N blocks, the block sum without (s0/c0) and with
// (s1/c1) an incoming carry, as read from the compound LUT-adder. Level l of
// the tree pairs neighbouring groups of 2^l blocks: the upper group takes
// its carry-0 or carry-1 version according to the carry out of the lower
// group's matching version, so after level l every group of 2^(l+1) blocks
// again has a carry-0 and a carry-1 version. One level is an and-or selection
// per bit; all groups of a level work in parallel, so the tree has
// L = ceil(log2 N) levels and the number of correctly joined bits doubles
// with every level.
//
// Output res[l] is the result after l levels: the carry-0 versions of all
// groups of 2^l blocks, concatenated with no carry passed between groups, and
// the carry out of the top group. res[L] is the exact sum; res[0] is the plain
// concatenation of the block sums. Purely combinational.
module tpfau_tree_select
  import tpfau_pkg::*;
#(
  parameter int K = 8,
  parameter int N = 4,
  localparam int L = clog2i(N),
  localparam int W = N * K
) (
  input  logic [K-1:0] s0  [N],
  input  logic [K-1:0] s1  [N],
  input  logic [N-1:0] c0,
  input  logic [N-1:0] c1,
  output logic [W:0]   res [L+1]     // {carry out, sum} after l levels
);

  // version-0 and version-1 sums, block b's bits in place, per level
  logic [W-1:0] v0 [L+1];
  logic [W-1:0] v1 [L+1];
  // carry out of group g (index g) of each version, per level
  logic [N-1:0] g0 [L+1];
  logic [N-1:0] g1 [L+1];

  always_comb begin
    for (int b = 0; b < N; b++) begin
      v0[0][b*K +: K] = s0[b];
      v1[0][b*K +: K] = s1[b];
    end
    g0[0] = c0;
    g1[0] = c1;
    for (int l = 0; l < L; l++) begin
      int ng;
      ng = (N + (1 << l) - 1) >> l;     // groups at level l
      // sums: a block in an odd (upper) group follows the lower group's carry
      for (int b = 0; b < N; b++) begin
        int g;
        g = b >> l;
        if (g % 2 == 1) begin
          v0[l+1][b*K +: K] = g0[l][g-1] ? v1[l][b*K +: K] : v0[l][b*K +: K];
          v1[l+1][b*K +: K] = g1[l][g-1] ? v1[l][b*K +: K] : v0[l][b*K +: K];
        end else begin
          v0[l+1][b*K +: K] = v0[l][b*K +: K];
          v1[l+1][b*K +: K] = v1[l][b*K +: K];
        end
      end
      // carries of the joined groups
      g0[l+1] = '0;
      g1[l+1] = '0;
      for (int h = 0; h < N; h++) begin
        if (2 * h + 1 < ng) begin
          g0[l+1][h] = g0[l][2*h] ? g1[l][2*h+1] : g0[l][2*h+1];
          g1[l+1][h] = g1[l][2*h] ? g1[l][2*h+1] : g0[l][2*h+1];
        end else if (2 * h < ng) begin
          g0[l+1][h] = g0[l][2*h];
          g1[l+1][h] = g1[l][2*h];
        end
      end
    end
    for (int l = 0; l <= L; l++)
      res[l] = {g0[l][((N + (1 << l) - 1) >> l) - 1], v0[l]};
  end

endmodule
