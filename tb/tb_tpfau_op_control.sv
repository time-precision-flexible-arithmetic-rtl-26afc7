// Testbench of tpfau_op_control: sweeps every condition code and compares the
// stage count with the speed bands 0-31 / 32-63 / 64-95 / 96+ (4..1 stages)
// and the tree levels with min(2, stages-1).
module tb_tpfau_op_control;
  logic [7:0] cond;
  logic [2:0] mul_stages;
  logic [1:0] add_levels;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  tpfau_op_control dut (.cond(cond), .mul_stages(mul_stages), .add_levels(add_levels));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es, el;
    for (int c = 0; c < 256; c++) begin
      cond = 8'(c);
      @(posedge clk);
      es = (c < 32) ? 4 : (c < 64) ? 3 : (c < 96) ? 2 : 1;
      el = (es - 1 < 2) ? es - 1 : 2;
      checks += 2;
      if (int'(mul_stages) != es) begin
        failures++;
        $display("cond %0d: stages %0d expected %0d", c, mul_stages, es);
      end
      if (int'(add_levels) != el) begin
        failures++;
        $display("cond %0d: levels %0d expected %0d", c, add_levels, el);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
