// Testbench of tpfau_lut_mult: reads every table address, spread over the
// sixteen ports, and compares each word with a*b.
module tb_tpfau_lut_mult;
  localparam int K = 8, NP = 16;
  logic [K-1:0]   a [NP], b [NP];
  logic [2*K-1:0] pr [NP];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  tpfau_lut_mult #(.K(K), .NPORTS(NP)) dut (.a(a), .b(b), .prod(pr));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int base = 0; base < (1 << (2 * K)); base += NP) begin
      for (int p = 0; p < NP; p++) begin
        a[p] = K'((base + p) >> K);
        b[p] = K'(base + p);
      end
      @(posedge clk);
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (int'(pr[p]) != int'(a[p]) * int'(b[p])) begin
          failures++;
          if (failures < 10) $display("port %0d: %0d*%0d -> %0d", p, a[p], b[p], pr[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
