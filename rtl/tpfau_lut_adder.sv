// tpfau_lut_adder: compound LUT-adder, a multiport table of precalculated
// block sums.
//
// For a pair of K-bit blocks (a, b) the table word holds both the sum a+b and
// its successor a+b+1, each K+1 bits wide (carry out on top). Carry handling
// of the carry-select scheme thus costs no adder at all: adding an incoming
// carry to a block is reading the successor. The source sizes its table for
// the K+1-bit sum alone; this design stores the successor beside it in the
// same word, which doubles the word width.
//
// NPORTS read ports address the single array concurrently, one per operand
// block pair. The array is filled at start-up by a loop (a ROM whose contents
// are a+b and a+b+1); reads are asynchronous, so a result is valid in the same
// cycle as its address.
module tpfau_lut_adder #(
  parameter int K      = 8,
  parameter int NPORTS = 4
) (
  input  logic [K-1:0] a    [NPORTS],
  input  logic [K-1:0] b    [NPORTS],
  output logic [K:0]   sum0 [NPORTS],   // a + b
  output logic [K:0]   sum1 [NPORTS]    // a + b + 1
);

  localparam int DEPTH = 1 << (2 * K);

  logic [2*K+1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      rom[i] = {(K+1)'(i >> K) + (K+1)'(i % (1 << K)) + (K+1)'(1),
                (K+1)'(i >> K) + (K+1)'(i % (1 << K))};
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic [2*K+1:0] word;
    assign word    = rom[{a[p], b[p]}];
    assign sum0[p] = word[K:0];
    assign sum1[p] = word[2*K+1:K+1];
  end

endmodule
