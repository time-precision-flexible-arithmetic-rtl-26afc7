// tpfau_csa_tree: Wallace tree of 3:2 counters (carry-save adders).
//
// Reduces R rows of W bits to two rows with the same sum modulo 2^W. At each
// level the rows are taken three at a time; every triple becomes a sum row
// (bitwise xor) and a carry row (bitwise majority shifted left by one), and
// the one or two rows left over pass to the next level unchanged. R rows need
// csa_depth(R) levels: 3 rows one level, 5 rows three, 7 rows four.
//
// Interface: rows in, sum_row and carry_row out; their sum is the sum of the
// inputs. Combinational; with R = 1 the carry row is zero.
module tpfau_csa_tree
  import tpfau_pkg::*;
#(
  parameter int R = 7,
  parameter int W = 64,
  localparam int D = csa_depth(R)
) (
  input  logic [W-1:0] rows [R],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);

  // one generate block per level; g_lvl[l].nxt holds the rows after level l
  for (genvar l = 0; l < D; l++) begin : g_lvl
    localparam int RC = csa_rows(R, l);
    localparam int NT = RC / 3;
    logic [W-1:0] cur [RC];
    logic [W-1:0] nxt [csa_rows(R, l + 1)];
    for (genvar r = 0; r < RC; r++) begin : g_cur
      if (l == 0) begin : g_first
        assign cur[r] = rows[r];
      end else begin : g_next
        assign cur[r] = g_lvl[l-1].nxt[r];
      end
    end
    for (genvar t = 0; t < NT; t++) begin : g_csa
      logic [W-1:0] x, y, z;
      assign x = cur[3*t];
      assign y = cur[3*t+1];
      assign z = cur[3*t+2];
      assign nxt[2*t]   = x ^ y ^ z;
      assign nxt[2*t+1] = ((x & y) | (x & z) | (y & z)) << 1;
    end
    for (genvar r = 0; r < RC % 3; r++) begin : g_pass
      assign nxt[2*NT+r] = cur[3*NT+r];
    end
  end

  if (D == 0) begin : g_none
    assign sum_row   = rows[0];
    assign carry_row = (R > 1) ? rows[R-1] : '0;
  end else begin : g_out
    assign sum_row   = g_lvl[D-1].nxt[0];
    assign carry_row = g_lvl[D-1].nxt[1];
  end

endmodule
