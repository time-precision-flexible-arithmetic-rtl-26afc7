// Testbench of tpfau_csa_tree: trees of 3, 5 and 7 rows (the sizes the
// flexible multiplier uses) and of 2 rows, fed random and all-ones rows; the
// two output rows must add up to the sum of the inputs modulo 2^W.
module tb_tpfau_csa_tree;
  localparam int W = 64;
  logic [W-1:0] r7 [7], r5 [5], r3 [3], r2 [2];
  logic [W-1:0] s7, c7, s5, c5, s3, c3, s2, c2;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  tpfau_csa_tree #(.R(7), .W(W)) d7 (.rows(r7), .sum_row(s7), .carry_row(c7));
  tpfau_csa_tree #(.R(5), .W(W)) d5 (.rows(r5), .sum_row(s5), .carry_row(c5));
  tpfau_csa_tree #(.R(3), .W(W)) d3 (.rows(r3), .sum_row(s3), .carry_row(c3));
  tpfau_csa_tree #(.R(2), .W(W)) d2 (.rows(r2), .sum_row(s2), .carry_row(c2));

  task automatic check(input string nm, input logic [W-1:0] got, input logic [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s: %h expected %h", nm, got, exp_v);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e7, e5, e3, e2;
    for (int it = 0; it < 5000; it++) begin
      e7 = '0; e5 = '0; e3 = '0; e2 = '0;
      for (int r = 0; r < 7; r++) begin
        r7[r] = (it % 5 == 0) ? '1 : {$urandom, $urandom};
        e7 += r7[r];
      end
      for (int r = 0; r < 5; r++) begin
        r5[r] = (it % 5 == 1) ? '1 : {$urandom, $urandom};
        e5 += r5[r];
      end
      for (int r = 0; r < 3; r++) begin
        r3[r] = {$urandom, $urandom};
        e3 += r3[r];
      end
      for (int r = 0; r < 2; r++) begin
        r2[r] = {$urandom, $urandom};
        e2 += r2[r];
      end
      @(posedge clk);
      check("R7", s7 + c7, e7);
      check("R5", s5 + c5, e5);
      check("R3", s3 + c3, e3);
      check("R2", s2 + c2, e2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
