// Testbench of tpfau_dot3: scalar products of random fraction vectors at
// speeds from all four bands. Each result is compared with a reference that
// applies the same stage count and tree levels to every product and sum, and
// its distance from the exact scalar product is checked against the bound of
// its band. done must rise on the fourth clock edge after the one that takes start.
module tb_tpfau_dot3;
  import tpfau_ref_pkg::*;
  localparam int M = 32, K = 8;
  logic          clk = 0, rst_n = 0, start = 0;
  logic [7:0]    speed;
  logic [M-1:0]  r [3], s [3];
  logic          busy, done;
  logic [M-1:0]  result;
  logic [2:0]    stages;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tpfau_dot3 dut (.clk(clk), .rst_n(rst_n), .start(start), .speed(speed), .r(r), .s(s),
                  .busy(busy), .done(done), .result(result), .stages(stages));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wide_t ref_dot(input int st);
    wide_t acc, pq;
    int lev;
    lev = (st - 1 < 2) ? st - 1 : 2;
    acc = '0;
    for (int i = 0; i < 3; i++) begin
      pq  = ref_mul(wide_t'(r[i]), wide_t'(s[i]), M, K, st) >> (M + 2);
      acc = ref_add(acc, pq, M, K, lev) & lowmask(M);
    end
    return acc;
  endfunction

  initial begin
    wide_t e;
    real exact, got, err, bound;
    int st, lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      for (int i = 0; i < 3; i++) begin
        r[i] = (it % 50 == 0) ? '1 : $urandom;
        s[i] = (it % 50 == 0) ? '1 : $urandom;
      end
      speed = 8'((it % 4) * 32 + int'($urandom % 32) + ((it % 4 == 3) ? int'($urandom % 23) : 0));
      st = ref_stages(int'(speed));
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done) begin
        @(negedge clk);
        lat++;
        if (lat > 20) break;
      end
      checks += 3;
      // lat counts the edge that takes start: done must rise four edges later
      if (lat != 5) begin
        failures++;
        $display("latency %0d", lat);
      end
      if (int'(stages) != st) failures++;
      e = ref_dot(st);
      if (wide_t'(result) != e) begin
        failures++;
        if (failures < 10) $display("speed %0d: %h expected %h", speed, result, e);
      end
      exact = 0.0;
      for (int i = 0; i < 3; i++)
        exact += (real'(r[i]) / 4294967296.0) * (real'(s[i]) / 4294967296.0);
      got = real'(result) / 1073741824.0;
      err = (exact > got) ? exact - got : got - exact;
      bound = (st == 4) ? 2.0 ** -28 : (st == 3) ? 2.0 ** -20 : (st == 2) ? 2.0 ** -11 : 2.0 ** -4;
      checks++;
      if (err > bound) begin
        failures++;
        $display("speed %0d: error %g above %g", speed, err, bound);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
