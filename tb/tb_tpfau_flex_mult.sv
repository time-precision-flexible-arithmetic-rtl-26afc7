// Testbench of tpfau_flex_mult: random and all-ones operands at every stage
// count 1..4, compared with the sum of the block products of the kept
// diagonals; stage 4 also against a*b. A second instance with 16-bit operands
// in 4-bit blocks (four blocks) checks another block size, and one with
// 64-bit operands (eight blocks, 15 rows) a larger tree. The row counts of
// the complete product are checked against ceil(2m/k) - 1 for m = 8..64 and
// k = 4, 8. Counts results that
// differ from the exact product, and checks the error of stage s stays below
// the weight of the first dropped diagonal times the number of its neighbours.
module tb_tpfau_flex_mult;
  import tpfau_ref_pkg::*;
  localparam int M = 32, K = 8;
  localparam int M2 = 16, K2 = 4;
  logic [M-1:0]    a, b;
  logic [2*M-1:0]  p;
  logic [2:0]      st;
  logic [M2-1:0]   a2, b2;
  logic [2*M2-1:0] p2;
  logic [2:0]      st2;
  localparam int M3 = 64, K3 = 8;
  logic [M3-1:0]   a3, b3;
  logic [2*M3-1:0] p3;
  logic [3:0]      st3;
  int checks = 0, failures = 0, inexact = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  tpfau_flex_mult #(.M(M), .K(K)) dut (.a(a), .b(b), .stages(st), .prod(p));
  tpfau_flex_mult #(.M(M2), .K(K2)) dut2 (.a(a2), .b(b2), .stages(st2), .prod(p2));
  tpfau_flex_mult #(.M(M3), .K(K3)) dut3 (.a(a3), .b(b3), .stages(st3), .prod(p3));

  // rows of the complete product for m bits in k-bit blocks, from the layout
  // functions the multiplier is built with
  function automatic int rows_full(input int m, input int k);
    int n;
    n = tpfau_pkg::nblocks(m, k);
    return tpfau_pkg::parity_rows(n, 0, 0) + tpfau_pkg::parity_rows(n, 0, 1);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t e, ex;
    int tab_m [4] = '{8, 16, 32, 64};
    int tab_k4 [4] = '{3, 7, 15, 31};
    int tab_k8 [4] = '{1, 3, 7, 15};
    // partial-product counts: ceil(2m/k) - 1
    for (int t = 0; t < 4; t++) begin
      checks += 2;
      if (rows_full(tab_m[t], 4) != tab_k4[t]) failures++;
      if (rows_full(tab_m[t], 8) != tab_k8[t]) failures++;
    end
    for (int it = 0; it < 4000; it++) begin
      a  = (it % 9 == 0) ? '1 : $urandom;
      b  = (it % 9 == 0) ? '1 : $urandom;
      a2 = M2'($urandom);
      b2 = M2'($urandom);
      st  = 3'(1 + it % 4);
      st2 = 3'(1 + (it / 4) % 4);
      a3  = {$urandom, $urandom};
      b3  = {$urandom, $urandom};
      st3 = 4'(1 + it % 8);
      @(posedge clk);
      e  = ref_mul(wide_t'(a), wide_t'(b), M, K, int'(st));
      ex = wide_t'(64'(a) * 64'(b));
      checks++;
      if (wide_t'(p) != e) begin
        failures++;
        if (failures < 10) $display("S%0d %h*%h -> %h expected %h", st, a, b, p, e);
      end
      if (e != ex) inexact++;
      // error bound: the dropped products all lie below diagonal 7-st
      if (st < 4) begin
        checks++;
        if (ex - wide_t'(p) >= wide_t'(4) << (K * (2 * 4 - 1 - int'(st)) + 2 * K)) failures++;
      end
      e = ref_mul(wide_t'(a3), wide_t'(b3), M3, K3, int'(st3));
      checks++;
      if (wide_t'(p3) != e) begin
        failures++;
        if (failures < 10) $display("M64 S%0d %h*%h -> %h expected %h", st3, a3, b3, p3, e);
      end
      e = ref_mul(wide_t'(a2), wide_t'(b2), M2, K2, int'(st2));
      checks++;
      if (wide_t'(p2) != e) begin
        failures++;
        if (failures < 10) $display("M16 S%0d %h*%h -> %h expected %h", st2, a2, b2, p2, e);
      end
    end
    checks++;
    if (inexact == 0) begin
      failures++;
      $display("no reduced-stage product was inexact");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
