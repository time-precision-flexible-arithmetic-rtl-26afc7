// tpfau_arith_unit: the time-precision flexible arithmetic unit.
//
// The unit adds or multiplies two M-bit operands with a precision chosen,
// operation by operation, from an application condition. The operation
// control turns the condition into a number of multiplication stages and of
// adder tree levels; the flexible adder and multiplier both see the operands
// and their stage count, and the operation code selects which result leaves
// the unit. Fewer stages mean a shorter combinational path and a less precise
// result; the full count gives the exact sum or product.
//
// Interface: op (OP_ADD or OP_MUL), a, b, cond in; result out (2M bits: the
// product, or the M-bit sum with its carry out at bit M), plus the stage count
// and tree levels applied. Combinational: a registered environment samples
// result after the delay of the selected path.
module tpfau_arith_unit
  import tpfau_pkg::*;
#(
  parameter int          M  = 32,
  parameter int          K  = 8,
  parameter int          CW = 8,
  localparam int         N  = nblocks(M, K),
  parameter int unsigned THRESH [N-1] = '{32, 64, 96},
  localparam int         L  = clog2i(N),
  localparam int         SW = clog2i(N + 1),
  localparam int         LW = (clog2i(L + 1) < 1) ? 1 : clog2i(L + 1)
) (
  input  op_e            op,
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  input  logic [CW-1:0]  cond,
  output logic [2*M-1:0] result,
  output logic [SW-1:0]  mul_stages,
  output logic [LW-1:0]  add_levels
);

  logic [M-1:0]   sum;
  logic           cout;
  logic [2*M-1:0] prod;

  tpfau_op_control #(.NSTAGES(N), .CW(CW), .THRESH(THRESH)) u_ctrl (
    .cond(cond), .mul_stages(mul_stages), .add_levels(add_levels)
  );

  tpfau_flex_adder #(.M(M), .K(K)) u_add (
    .a(a), .b(b), .levels(add_levels), .sum(sum), .cout(cout)
  );

  tpfau_flex_mult #(.M(M), .K(K)) u_mul (
    .a(a), .b(b), .stages(mul_stages), .prod(prod)
  );

  assign result = (op == OP_MUL) ? prod : (2*M)'({cout, sum});

endmodule
