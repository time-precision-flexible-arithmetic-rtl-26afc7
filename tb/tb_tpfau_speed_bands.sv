// Workload testbench: the guided-object scalar product over the four speed
// bands. For each band it runs 1000 scalar products of random fraction
// vectors on tpfau_dot3 at its default size (32-bit components, 8-bit
// blocks), measures the mean absolute error against the exact product and
// prints it as a power of two next to the value the design was specified
// for (2^-30.91, 2^-22.97, 2^-14.82, 2^-6.89 for 4..1 stages). It checks that
// each band's mean error lies within four binary orders of that value, that
// the error falls as the stage count rises, and the four-cycle latency.
module tb_tpfau_speed_bands;
  localparam int M = 32;
  localparam int RUNS = 1000;
  logic          clk = 0, rst_n = 0, start = 0;
  logic [7:0]    speed;
  logic [M-1:0]  r [3], s [3];
  logic          busy, done;
  logic [M-1:0]  result;
  logic [2:0]    stages;
  int checks = 0, failures = 0;
  real target [5] = '{0.0, -6.89, -14.82, -22.97, -30.91};
  real mean_err [5];
  always #5 clk = ~clk;

  tpfau_dot3 dut (.clk(clk), .rst_n(rst_n), .start(start), .speed(speed), .r(r), .s(s),
                  .busy(busy), .done(done), .result(result), .stages(stages));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exact, got, sum_err, lg;
    int lat, st;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int band = 0; band < 4; band++) begin
      sum_err = 0.0;
      st = 4 - band;
      for (int it = 0; it < RUNS; it++) begin
        @(negedge clk);
        for (int i = 0; i < 3; i++) begin
          r[i] = $urandom;
          s[i] = $urandom;
        end
        speed = 8'(band * 32 + int'($urandom % ((band == 3) ? 55 : 32)));
        start = 1;
        @(negedge clk);
        start = 0;
        lat = 1;
        while (!done && lat < 20) begin
          @(negedge clk);
          lat++;
        end
        checks += 2;
        if (lat != 5) failures++;
        if (int'(stages) != st) failures++;
        exact = 0.0;
        for (int i = 0; i < 3; i++)
          exact += (real'(r[i]) / 4294967296.0) * (real'(s[i]) / 4294967296.0);
        got = real'(result) / 1073741824.0;
        sum_err += (exact > got) ? exact - got : got - exact;
      end
      mean_err[st] = sum_err / RUNS;
      lg = $ln(mean_err[st]) / $ln(2.0);
      $display("speed band %0d (%0d stages): mean |error| = 2^%0.2f, specified 2^%0.2f",
               band, st, lg, target[st]);
      checks++;
      if (lg > target[st] + 4.0 || lg < target[st] - 4.0) failures++;
    end
    for (int st2 = 1; st2 < 4; st2++) begin
      checks++;
      if (mean_err[st2 + 1] >= mean_err[st2]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
