// tpfau_top: the flexible arithmetic unit and its scalar-product application,
// side by side.
//
// au_*: the general arithmetic unit (combinational add or multiply with a
// condition-driven precision). dp_*: the scalar-product engine for a guided
// object, which uses its own flexible multiplier and adder and takes the
// object speed as condition (four cycles from dp_start to dp_done). Both use
// the default configuration of 32-bit operands in 8-bit blocks.
module tpfau_top
  import tpfau_pkg::*;
#(
  parameter int  M  = 32,
  parameter int  K  = 8,
  parameter int  CW = 8,
  localparam int N  = nblocks(M, K),
  localparam int L  = clog2i(N),
  localparam int SW = clog2i(N + 1),
  localparam int LW = (clog2i(L + 1) < 1) ? 1 : clog2i(L + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // arithmetic unit
  input  op_e            au_op,
  input  logic [M-1:0]   au_a,
  input  logic [M-1:0]   au_b,
  input  logic [CW-1:0]  au_cond,
  output logic [2*M-1:0] au_result,
  output logic [SW-1:0]  au_mul_stages,
  output logic [LW-1:0]  au_add_levels,
  // scalar product
  input  logic           dp_start,
  input  logic [CW-1:0]  dp_speed,
  input  logic [M-1:0]   dp_r [3],
  input  logic [M-1:0]   dp_s [3],
  output logic           dp_busy,
  output logic           dp_done,
  output logic [M-1:0]   dp_result,
  output logic [SW-1:0]  dp_stages
);

  tpfau_arith_unit #(.M(M), .K(K), .CW(CW)) u_au (
    .op(au_op), .a(au_a), .b(au_b), .cond(au_cond),
    .result(au_result), .mul_stages(au_mul_stages), .add_levels(au_add_levels)
  );

  tpfau_dot3 #(.M(M), .K(K), .CW(CW)) u_dp (
    .clk(clk), .rst_n(rst_n), .start(dp_start), .speed(dp_speed),
    .r(dp_r), .s(dp_s), .busy(dp_busy), .done(dp_done),
    .result(dp_result), .stages(dp_stages)
  );

endmodule
