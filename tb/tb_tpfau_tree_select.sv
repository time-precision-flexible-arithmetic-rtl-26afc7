// Testbench of tpfau_tree_select: random block sums (s1 = s0 + 1 with its
// carry, as the compound LUT-adder delivers them) and every level's output
// compared with the group-wise sum of the underlying operands. Includes long
// carry chains (all blocks summing to 2^K - 1).
module tb_tpfau_tree_select;
  import tpfau_ref_pkg::*;
  localparam int K = 8, N = 4, L = 2;
  logic [K-1:0] s0 [N], s1 [N];
  logic [N-1:0] c0, c1;
  logic [N*K:0] res [L+1];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  tpfau_tree_select #(.K(K), .N(N)) dut (.s0(s0), .s1(s1), .c0(c0), .c1(c1), .res(res));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t a, b, exp_v;
    for (int it = 0; it < 3000; it++) begin
      a = '0;
      b = '0;
      for (int i = 0; i < N; i++) begin
        logic [K-1:0] x, y;
        x = K'($urandom);
        y = K'($urandom);
        if (it % 3 == 0) y = ~x;               // block sum 2^K-1: propagate
        if (it % 7 == 0 && i == 0) y = K'(256 - int'(x)); // generate
        a |= wide_t'(x) << (i * K);
        b |= wide_t'(y) << (i * K);
        {c0[i], s0[i]} = {1'b0, x} + {1'b0, y};
        {c1[i], s1[i]} = {1'b0, x} + {1'b0, y} + 9'd1;
      end
      @(posedge clk);
      for (int l = 0; l <= L; l++) begin
        exp_v = ref_add(a, b, N * K, K, l);
        checks++;
        if (wide_t'(res[l]) != exp_v) begin
          failures++;
          if (failures < 10) $display("level %0d: %h + %h -> %h expected %h", l, a, b, res[l], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
