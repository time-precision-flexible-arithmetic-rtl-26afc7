// Testbench of tpfau_lut_adder: reads every table address, spread over the
// four ports, and compares both words with a+b and a+b+1.
module tb_tpfau_lut_adder;
  localparam int K = 8, NP = 4;
  logic [K-1:0] a [NP], b [NP];
  logic [K:0]   s0 [NP], s1 [NP];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  tpfau_lut_adder #(.K(K), .NPORTS(NP)) dut (.a(a), .b(b), .sum0(s0), .sum1(s1));

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
        if (int'(s0[p]) != int'(a[p]) + int'(b[p]) ||
            int'(s1[p]) != int'(a[p]) + int'(b[p]) + 1) begin
          failures++;
          if (failures < 10)
            $display("port %0d: %0d+%0d -> %0d/%0d", p, a[p], b[p], s0[p], s1[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
