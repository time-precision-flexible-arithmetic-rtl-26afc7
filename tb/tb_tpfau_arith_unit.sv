// Testbench of tpfau_arith_unit: random operations, operands and condition
// codes; each result compared with the reference at the stage count and tree
// levels the speed bands give. Every stage count and both operations must
// occur.
module tb_tpfau_arith_unit;
  import tpfau_pkg::*;
  import tpfau_ref_pkg::*;
  localparam int M = 32, K = 8;
  op_e            op;
  logic [M-1:0]   a, b;
  logic [7:0]     cond;
  logic [2*M-1:0] res;
  logic [2:0]     ms;
  logic [1:0]     al;
  int checks = 0, failures = 0;
  int seen_st [5];
  int seen_op [2];
  logic clk = 0;
  always #5 clk = ~clk;

  tpfau_arith_unit dut (.op(op), .a(a), .b(b), .cond(cond), .result(res),
                        .mul_stages(ms), .add_levels(al));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t e;
    int es, el;
    for (int it = 0; it < 4000; it++) begin
      op   = ($urandom % 2 == 1) ? OP_MUL : OP_ADD;
      a    = $urandom;
      b    = (it % 5 == 0) ? ~a : $urandom;
      cond = 8'($urandom % 151);
      @(posedge clk);
      es = ref_stages(int'(cond));
      el = (es - 1 < 2) ? es - 1 : 2;
      e  = (op == OP_MUL) ? ref_mul(wide_t'(a), wide_t'(b), M, K, es)
                          : ref_add(wide_t'(a), wide_t'(b), M, K, el);
      seen_st[es]++;
      seen_op[op]++;
      checks += 2;
      if (int'(ms) != es || int'(al) != el) failures++;
      if (wide_t'(res) != e) begin
        failures++;
        if (failures < 10) $display("%s cond %0d %h,%h -> %h expected %h", op.name(), cond, a, b, res, e);
      end
    end
    for (int s = 1; s <= 4; s++) begin
      checks++;
      if (seen_st[s] == 0) failures++;
    end
    checks += 2;
    if (seen_op[0] == 0) failures++;
    if (seen_op[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
