// tpfau_op_control: operation control of the flexible arithmetic unit.
//
// A purely combinational table circuit. Its input is an application condition,
// here the speed of the guided object as an unsigned code; its outputs are the
// number of multiplication stages (1..NSTAGES) and the number of selection-tree
// levels the adder performs (0..ceil(log2 NSTAGES)). The faster the object,
// the less time there is and the fewer stages are processed.
//
// The thresholds default to the speed bands of the scalar-product example:
// [0,32) -> 4 stages, [32,64) -> 3, [64,96) -> 2, [96,...) -> 1. The band
// boundaries follow the source; how a stage count maps onto the adder's tree
// levels is this design's choice: levels = min(ceil(log2 N), stages - 1), so
// the adder is exact whenever the multiplication keeps at least its three most
// significant product diagonals.
//
// Interface: cond in, mul_stages and add_levels out, no clock; the outputs
// settle one table lookup after cond changes.
module tpfau_op_control
  import tpfau_pkg::*;
#(
  parameter int          NSTAGES = 4,
  parameter int          CW      = 8,
  parameter int unsigned THRESH [NSTAGES-1] = '{32, 64, 96},
  localparam int         LOGN    = clog2i(NSTAGES),
  localparam int         SW      = clog2i(NSTAGES + 1),
  localparam int         LW      = (clog2i(LOGN + 1) < 1) ? 1 : clog2i(LOGN + 1)
) (
  input  logic [CW-1:0] cond,
  output logic [SW-1:0] mul_stages,
  output logic [LW-1:0] add_levels
);

  always_comb begin
    int unsigned s;
    // count the thresholds the condition has reached: each removes one stage
    s = NSTAGES;
    for (int t = 0; t < NSTAGES - 1; t++)
      if (32'(cond) >= THRESH[t]) s = NSTAGES - 1 - t;
    mul_stages = SW'(s);
    add_levels = (s - 1 < LOGN) ? LW'(s - 1) : LW'(LOGN);
  end

endmodule
