// Workload testbench: error of the flexible operators on 48-bit fractions in
// 8-bit blocks (six blocks, three adder tree levels, six multiplier stages).
//  - independent additions: 20000 random pairs in [0,1) per tree level; the
//    mean error of each level is printed and must shrink with every level,
//    reaching zero at the last;
//  - successive multiplications: 100 chains of 100 products of random
//    fractions per stage count, each chain fed its own inexact results; the mean
//    absolute error over all steps of all chains is printed and must shrink
//    with every stage.
// Every result is also compared with the reference model.
module tb_tpfau_error48;
  import tpfau_ref_pkg::*;
  localparam int M = 48, K = 8, N = 6, L = 3;
  localparam int NADD = 20000, CHAINS = 100, CHAIN_LEN = 100;
  logic [M-1:0]   a, b, sum, ma, mb;
  logic           cout;
  logic [1:0]     lev;
  logic [2:0]     st;
  logic [2*M-1:0] prod;
  int checks = 0, failures = 0;
  real add_err [L+1];
  real mul_err [N+1];
  logic clk = 0;
  always #5 clk = ~clk;

  tpfau_flex_adder #(.M(M), .K(K)) u_add (.a(a), .b(b), .levels(lev), .sum(sum), .cout(cout));
  tpfau_flex_mult  #(.M(M), .K(K)) u_mul (.a(ma), .b(mb), .stages(st), .prod(prod));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real tot, ex, x_exact;
    logic [M-1:0] x;
    wide_t e;
    // independent additions
    for (int l = 0; l <= L; l++) begin
      tot = 0.0;
      lev = 2'(l);
      for (int it = 0; it < NADD; it++) begin
        a = M'({$urandom, $urandom});
        b = M'({$urandom, $urandom});
        @(posedge clk);
        e = ref_add(wide_t'(a), wide_t'(b), M, K, l);
        checks++;
        if (wide_t'({cout, sum}) != e) failures++;
        ex = ((real'(a) + real'(b)) - real'({cout, sum})) / (2.0 ** M);
        tot += (ex < 0.0) ? -ex : ex;
      end
      add_err[l] = tot / NADD;
      $display("addition, %0d tree levels: mean |error| = %g", l, add_err[l]);
    end
    // successive multiplications
    for (int s = 1; s <= N; s++) begin
      tot = 0.0;
      st = 3'(s);
      for (int c = 0; c < CHAINS; c++) begin
        x = M'({$urandom, $urandom}) | (M'(1) << (M - 1));   // start in [0.5,1)
        x_exact = real'(x) / (2.0 ** M);
        for (int it = 0; it < CHAIN_LEN; it++) begin
          ma = x;
          mb = M'({$urandom, $urandom}) | (M'(3) << (M - 2)); // factors in [0.75,1)
          @(posedge clk);
          e = ref_mul(wide_t'(ma), wide_t'(mb), M, K, s);
          checks++;
          if (wide_t'(prod) != e) failures++;
          x_exact = x_exact * (real'(mb) / (2.0 ** M));
          x = prod[2*M-1 -: M];
          ex = x_exact - real'(x) / (2.0 ** M);
          tot += (ex < 0.0) ? -ex : ex;
        end
      end
      mul_err[s] = tot / (CHAINS * CHAIN_LEN);
      $display("multiplication chains, %0d stages: mean |error| = %g", s, mul_err[s]);
    end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (add_err[l + 1] >= add_err[l]) failures++;
    end
    checks++;
    if (add_err[L] != 0.0) failures++;
    for (int s = 1; s < N; s++) begin
      checks++;
      if (mul_err[s + 1] >= mul_err[s]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
