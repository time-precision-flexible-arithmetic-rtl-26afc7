// End-to-end testbench of tpfau_top at its default size (32-bit operands,
// 8-bit blocks). It drives both halves of the design at once:
//  - the arithmetic unit with a random mix of additions and multiplications
//    at random speed codes, every result compared with the reference at the
//    stage count the speed selects;
//  - the scalar-product engine, a new product started whenever it is idle,
//    each result compared with the reference and with the exact value.
// It counts every mechanism the design has and fails if one never happened:
// each adder tree level, each multiplier stage count, a dropped carry, an
// inexact reduced product, a switch between add and multiply, and a scalar
// product in each of the four speed bands with the four-cycle latency.
module tb_tpfau_top;
  import tpfau_pkg::*;
  import tpfau_ref_pkg::*;
  localparam int M = 32, K = 8;

  logic           clk = 0, rst_n = 0;
  op_e            au_op;
  logic [M-1:0]   au_a, au_b;
  logic [7:0]     au_cond;
  logic [2*M-1:0] au_result;
  logic [2:0]     au_mul_stages;
  logic [1:0]     au_add_levels;
  logic           dp_start = 0;
  logic [7:0]     dp_speed;
  logic [M-1:0]   dp_r [3], dp_s [3];
  logic           dp_busy, dp_done;
  logic [M-1:0]   dp_result;
  logic [2:0]     dp_stages;

  int checks = 0, failures = 0;
  int n_add_lev [3];
  int n_mul_st [5];
  int n_dropped = 0, n_inexact = 0, n_switch = 0;
  int n_band [5];
  always #5 clk = ~clk;

  tpfau_top dut (
    .clk(clk), .rst_n(rst_n),
    .au_op(au_op), .au_a(au_a), .au_b(au_b), .au_cond(au_cond),
    .au_result(au_result), .au_mul_stages(au_mul_stages), .au_add_levels(au_add_levels),
    .dp_start(dp_start), .dp_speed(dp_speed), .dp_r(dp_r), .dp_s(dp_s),
    .dp_busy(dp_busy), .dp_done(dp_done), .dp_result(dp_result), .dp_stages(dp_stages)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  // arithmetic unit traffic
  initial begin
    wide_t e, ex;
    int es, el;
    op_e prev_op;
    prev_op = OP_ADD;
    au_op = OP_ADD; au_a = '0; au_b = '0; au_cond = '0;
    @(posedge rst_n);
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      au_op   = ($urandom % 3 == 0) ? prev_op : (($urandom % 2 == 1) ? OP_MUL : OP_ADD);
      au_a    = $urandom;
      au_b    = (it % 6 == 0) ? ~au_a : $urandom;
      au_cond = 8'($urandom % 151);
      #1;
      es = ref_stages(int'(au_cond));
      el = (es - 1 < 2) ? es - 1 : 2;
      if (au_op == OP_MUL) begin
        e  = ref_mul(wide_t'(au_a), wide_t'(au_b), M, K, es);
        ex = ref_mul(wide_t'(au_a), wide_t'(au_b), M, K, 4);
        n_mul_st[es]++;
        if (e != ex) n_inexact++;
      end else begin
        e  = ref_add(wide_t'(au_a), wide_t'(au_b), M, K, el);
        ex = ref_add(wide_t'(au_a), wide_t'(au_b), M, K, 2);
        n_add_lev[el]++;
        if (e != ex) n_dropped++;
      end
      if (it > 0 && au_op != prev_op) n_switch++;
      prev_op = au_op;
      checks += 2;
      if (wide_t'(au_result) != e)
        fail($sformatf("AU %s cond %0d %h,%h -> %h expected %h",
                       au_op.name(), au_cond, au_a, au_b, au_result, e));
      if (int'(au_mul_stages) != es || int'(au_add_levels) != el)
        fail($sformatf("AU cond %0d stages %0d levels %0d", au_cond, au_mul_stages, au_add_levels));
    end
  end

  // scalar-product traffic
  initial begin
    wide_t acc, pq, e;
    real exact, got, err, bound;
    int st, lev, lat;
    for (int i = 0; i < 3; i++) begin
      dp_r[i] = '0;
      dp_s[i] = '0;
    end
    dp_speed = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        dp_r[i] = $urandom;
        dp_s[i] = $urandom;
      end
      dp_speed = 8'($urandom % 151);
      st = ref_stages(int'(dp_speed));
      dp_start = 1;
      @(negedge clk);
      dp_start = 0;
      lat = 1;
      while (!dp_done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      lev = (st - 1 < 2) ? st - 1 : 2;
      acc = '0;
      for (int i = 0; i < 3; i++) begin
        pq  = ref_mul(wide_t'(dp_r[i]), wide_t'(dp_s[i]), M, K, st) >> (M + 2);
        acc = ref_add(acc, pq, M, K, lev) & lowmask(M);
      end
      e = acc;
      exact = 0.0;
      for (int i = 0; i < 3; i++)
        exact += (real'(dp_r[i]) / 4294967296.0) * (real'(dp_s[i]) / 4294967296.0);
      got = real'(dp_result) / 1073741824.0;
      err = (exact > got) ? exact - got : got - exact;
      bound = (st == 4) ? 2.0 ** -28 : (st == 3) ? 2.0 ** -19 : (st == 2) ? 2.0 ** -11 : 2.0 ** -4;
      checks += 4;
      if (lat != 5) fail($sformatf("scalar product latency %0d edges", lat - 1));
      else n_band[st]++;
      if (int'(dp_stages) != st) fail("scalar product stage count");
      if (wide_t'(dp_result) != e)
        fail($sformatf("scalar product speed %0d: %h expected %h", dp_speed, dp_result, e));
      if (err > bound) fail($sformatf("scalar product error %g above %g", err, bound));
    end
    // mechanism coverage
    for (int l = 0; l <= 2; l++) begin
      checks++;
      $display("additions with %0d tree levels: %0d", l, n_add_lev[l]);
      if (n_add_lev[l] == 0) fail($sformatf("no addition with %0d levels", l));
    end
    for (int s = 1; s <= 4; s++) begin
      checks += 2;
      $display("multiplications with %0d stages: %0d, scalar products with %0d stages: %0d",
               s, n_mul_st[s], s, n_band[s]);
      if (n_mul_st[s] == 0) fail($sformatf("no multiplication with %0d stages", s));
      if (n_band[s] == 0) fail($sformatf("no scalar product with %0d stages", s));
    end
    $display("dropped carries: %0d, inexact products: %0d, add/mul switches: %0d",
             n_dropped, n_inexact, n_switch);
    checks += 3;
    if (n_dropped == 0) fail("no addition dropped a carry");
    if (n_inexact == 0) fail("no reduced product was inexact");
    if (n_switch == 0) fail("the operation never switched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
