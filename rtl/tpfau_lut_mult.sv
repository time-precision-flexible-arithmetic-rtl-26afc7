// tpfau_lut_mult: LUT-multiplier, a multiport table of precalculated block
// products.
//
// The word at address {a, b} is the 2K-bit product a*b of two K-bit blocks.
// NPORTS read ports address the single array concurrently, one per block pair
// (N*N ports for N-block operands), so all partial products of an operation
// come out of one access time. The array is filled at start-up by a loop (a
// ROM holding a*b); reads are asynchronous.
module tpfau_lut_mult #(
  parameter int K      = 8,
  parameter int NPORTS = 16
) (
  input  logic [K-1:0]   a    [NPORTS],
  input  logic [K-1:0]   b    [NPORTS],
  output logic [2*K-1:0] prod [NPORTS]
);

  localparam int DEPTH = 1 << (2 * K);

  logic [2*K-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      rom[i] = (2*K)'(i >> K) * (2*K)'(i % (1 << K));
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    assign prod[p] = rom[{a[p], b[p]}];
  end

endmodule
