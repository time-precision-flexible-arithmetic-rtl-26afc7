// tpfau_dot3: flexible scalar product r.S = rx*sx + ry*sy + rz*sz.
//
// The three multiplications go one per cycle through a single flexible
// multiplier; the accumulation runs one cycle behind on a flexible adder, so
// each sum is formed while the next product is being made. The operation
// control picks, from the object's speed sampled at start, the stage count of
// every multiplication and the tree levels of every addition: the faster the
// object, the fewer stages and the coarser the result.
//
// Number format: the components are unsigned fractions in [0,1) with M
// fraction bits. A product is kept as its top M-2 fraction bits and the sum
// is held with 2 integer bits and M-2 fraction bits (Q2.(M-2)), enough for a
// result below 3. This format is this design's choice.
//
// The low M+2 bits of the double-width product are deliberately unused: the
// product is truncated to the accumulator format. Reset is synchronous and
// active low.
//
// Timing: start is taken when busy is low. Products are formed in the three
// cycles after start, the last addition in the fourth; done pulses for one
// cycle with result valid, four cycles after start. result holds until the
// next start.
module tpfau_dot3
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
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] speed,
  input  logic [M-1:0]  r [3],
  input  logic [M-1:0]  s [3],
  output logic          busy,
  output logic          done,
  output logic [M-1:0]  result,
  output logic [SW-1:0] stages
);

  localparam int IB = 2;   // integer bits of the accumulator

  typedef enum logic [2:0] {
    ST_IDLE, ST_MUL0, ST_MUL1, ST_MUL2, ST_ADD
  } state_e;

  state_e         state;
  logic [M-1:0]   rq [3];
  logic [M-1:0]   sq [3];
  logic [SW-1:0]  mul_st, mul_st_q;
  logic [LW-1:0]  add_lv, add_lv_q;
  logic [M-1:0]   ma, mb;
  logic [2*M-1:0] prod;
  logic [M-1:0]   pq;          // registered product, Q2.(M-2)
  logic           pq_valid;
  logic [M-1:0]   acc, acc_next;
  logic           acc_cout;

  tpfau_op_control #(.NSTAGES(N), .CW(CW), .THRESH(THRESH)) u_ctrl (
    .cond(speed), .mul_stages(mul_st), .add_levels(add_lv)
  );

  always_comb begin
    unique case (state)
      ST_MUL1: begin ma = rq[1]; mb = sq[1]; end
      ST_MUL2: begin ma = rq[2]; mb = sq[2]; end
      default: begin ma = rq[0]; mb = sq[0]; end
    endcase
  end

  tpfau_flex_mult #(.M(M), .K(K)) u_mul (
    .a(ma), .b(mb), .stages(mul_st_q), .prod(prod)
  );

  tpfau_flex_adder #(.M(M), .K(K)) u_add (
    .a(acc), .b(pq), .levels(add_lv_q), .sum(acc_next), .cout(acc_cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      mul_st_q <= '0;
      add_lv_q <= '0;
      pq       <= '0;
      pq_valid <= 1'b0;
      acc      <= '0;
      done     <= 1'b0;
      for (int i = 0; i < 3; i++) begin
        rq[i] <= '0;
        sq[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      // accumulate the product formed in the previous cycle
      if (pq_valid) acc <= acc_next;
      pq_valid <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          rq       <= r;
          sq       <= s;
          mul_st_q <= mul_st;
          add_lv_q <= add_lv;
          acc      <= '0;
          state    <= ST_MUL0;
        end
        ST_MUL0, ST_MUL1, ST_MUL2: begin
          pq       <= M'(prod[2*M-1 -: M-IB]);
          pq_valid <= 1'b1;
          state    <= (state == ST_MUL0) ? ST_MUL1 :
                      (state == ST_MUL1) ? ST_MUL2 : ST_ADD;
        end
        ST_ADD: begin
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy   = (state != ST_IDLE);
  assign result = acc;
  assign stages = mul_st_q;

  // the products are below 1 and there are three, so the Q2 sum never wraps
  // when the addition is exact
  a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
    (pq_valid && add_lv_q == LW'(L)) |-> !acc_cout);

endmodule
