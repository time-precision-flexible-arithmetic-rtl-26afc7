// Testbench of tpfau_flex_adder: random and carry-chain operands at every
// tree level, compared with the group-wise reference sum; also a 20-bit
// instance (padded top block, three blocks, two levels). Counts how often a
// reduced level actually differs from the exact sum (a dropped carry).
module tb_tpfau_flex_adder;
  import tpfau_ref_pkg::*;
  localparam int M = 32, K = 8;
  localparam int M2 = 20, K2 = 8;
  logic [M-1:0]  a, b, sum;
  logic [1:0]    lev;
  logic          cout;
  logic [M2-1:0] a2, b2, sum2;
  logic [1:0]    lev2;
  logic          cout2;
  int checks = 0, failures = 0, dropped = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  tpfau_flex_adder #(.M(M), .K(K)) dut (.a(a), .b(b), .levels(lev), .sum(sum), .cout(cout));
  tpfau_flex_adder #(.M(M2), .K(K2)) dut2 (.a(a2), .b(b2), .levels(lev2), .sum(sum2), .cout(cout2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t e, ex;
    for (int it = 0; it < 4000; it++) begin
      a = $urandom;
      b = (it % 4 == 0) ? ~a + M'(it % 3) : $urandom;
      a2 = M2'($urandom);
      b2 = (it % 4 == 1) ? ~a2 + M2'(it % 2) : M2'($urandom);
      lev = 2'(it % 3);
      lev2 = 2'(it % 3);
      @(posedge clk);
      e  = ref_add(wide_t'(a), wide_t'(b), M, K, int'(lev));
      ex = ref_add(wide_t'(a), wide_t'(b), M, K, 2);
      checks++;
      if (wide_t'({cout, sum}) != e) begin
        failures++;
        if (failures < 10) $display("L%0d %h+%h -> %h expected %h", lev, a, b, {cout, sum}, e);
      end
      if (e != ex) dropped++;
      if (lev == 2) begin
        checks++;
        if ({1'b0, cout, sum} != 34'(a) + 34'(b)) failures++;
      end
      e = ref_add(wide_t'(a2), wide_t'(b2), M2, K2, int'(lev2));
      checks++;
      if (wide_t'({cout2, sum2}) != e) begin
        failures++;
        if (failures < 10) $display("M20 L%0d %h+%h -> %h expected %h", lev2, a2, b2, {cout2, sum2}, e);
      end
    end
    checks++;
    if (dropped == 0) begin
      failures++;
      $display("no reduced-level sum ever dropped a carry");
    end
    $display("reduced-level results that dropped a carry: %0d", dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
