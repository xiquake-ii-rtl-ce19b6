// vpu: four-lane single-precision vector unit.
//
// Operates on two 128-bit vectors A (d1) and B (d2), each four 32-bit
// elements, and produces a 128-bit result T:
//   ADD/SUB/MUL/DIV  element-wise A op B              (four fp_unit lanes)
//   MOV              T = A
//   INV              T = 1 / A, by dividing 1.0 by each element
//   SUM              T = [(a0+a1)+(a2+a3), b0, b1, b2] (lanes 0 and 1 add
//                    the pairs, one further adder combines them)
//   ITOF / FTOI      element-wise signed-integer <-> float conversion
//   SQRT             element-wise square root, iterative
//
// Timing: start is a one-cycle request with op, d1 and d2 valid. Every
// operation except SQRT is combinational: done rises in the same cycle as
// start and result is valid then. SQRT registers its operands, runs four
// sqrt_nonrestoring units in parallel on 26-bit radicands and raises done
// for one cycle SQRT_W/2 (13) cycles after start; result then holds
// until the next start. busy is high while a square root is running;
// the cancel input abandons it.
//
// The operation set, the four-lane organisation, single-cycle operation of
// everything but SQRT and the 13-cycle iterative square root follow the
// original design. The square root yields a 13-bit root, so its results
// carry 12 fraction bits (the low 11 are zero); negative non-zero inputs
// give NaN. The summation order of SUM and the radicand framing are this
// design's choices.
module vpu
  import vpu_pkg::*;
#(
  parameter int unsigned SQRT_W = SQRT_WIDTH   // radicand bits; latency SQRT_W/2
) (
  input  logic    clk,
  input  logic    rst,
  input  vpu_op_e op,
  input  logic    start,
  input  logic    cancel,
  input  vec_t    d1,
  input  vec_t    d2,
  output vec_t    result,
  output logic    done,
  output logic    busy
);

  localparam int unsigned RB = SQRT_W / 2;      // root bits

  // ---------------- single-cycle part: four lanes plus the SUM adder -----
  lane_op_e lane_op;
  vec_t     lane_a, lane_b, lane_y;
  fp32_t    sum_y;

  always_comb begin
    lane_a = d1;
    lane_b = d2;
    unique case (op)
      OP_ADD:  lane_op = LANE_ADD;
      OP_SUB:  lane_op = LANE_SUB;
      OP_MUL:  lane_op = LANE_MUL;
      OP_DIV:  lane_op = LANE_DIV;
      OP_INV: begin
        lane_op = LANE_DIV;
        lane_a  = {FP_ONE, FP_ONE, FP_ONE, FP_ONE};
        lane_b  = d1;
      end
      OP_SUM: begin
        lane_op = LANE_ADD;
        lane_a  = {d1[0], d1[2], 32'd0, 32'd0};
        lane_b  = {d1[1], d1[3], 32'd0, 32'd0};
      end
      OP_ITOF: lane_op = LANE_ITOF;
      OP_FTOI: lane_op = LANE_FTOI;
      default: lane_op = LANE_ADD;
    endcase
  end

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    fp_unit u_fpu (.op(lane_op), .a(lane_a[l]), .b(lane_b[l]), .y(lane_y[l]));
  end

  fp_addsub u_sum_add (.a(lane_y[0]), .b(lane_y[1]), .sub(1'b0), .y(sum_y));

  // ---------------- iterative square root -------------------------------
  logic  [3:0]        sq_busy, sq_done;
  logic  [RB-1:0]     sq_root [4];
  logic  [RB:0]       sq_rem  [4];
  logic  [SQRT_W-1:0] sq_rad  [4];
  logic               sq_start;
  fp32_t              sq_special   [4];   // result when not a normal positive input
  logic  [3:0]        sq_is_special;
  logic  [7:0]        sq_exp       [4];
  fp32_t              sq_special_q [4];
  logic  [3:0]        sq_is_special_q;
  logic  [7:0]        sq_exp_q     [4];

  assign sq_start = start && (op == OP_SQRT);

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_sqrt
    logic [7:0]  e;
    logic [23:0] m;
    int          eu;
    always_comb begin
      e  = d1[l][30:23];
      m  = {1'b1, d1[l][22:0]};
      eu = int'(e) - 127;
      // Radicand 2*m (exponent even) or 4*m (odd): its root has 13 bits
      // with the leading one at the top.
      sq_rad[l] = eu[0] ? SQRT_W'({m, 2'b00}) << (SQRT_W - 26)
                        : SQRT_W'({m, 1'b0})  << (SQRT_W - 26);
      sq_exp[l] = 8'((eu >>> 1) + 127);
      sq_is_special[l] = 1'b1;
      if (e == 8'd0)                          sq_special[l] = {d1[l][31], 31'd0};
      else if (e == 8'hFF && d1[l][22:0] != 0) sq_special[l] = FP_QNAN;
      else if (d1[l][31])                     sq_special[l] = FP_QNAN;
      else if (e == 8'hFF)                    sq_special[l] = d1[l];
      else begin
        sq_special[l]    = '0;
        sq_is_special[l] = 1'b0;
      end
    end

    sqrt_nonrestoring #(.W(SQRT_W)) u_sqrt (
      .clk       (clk),
      .rst       (rst),
      .start     (sq_start),
      .cancel     (cancel),
      .radicand  (sq_rad[l]),
      .busy      (sq_busy[l]),
      .done      (sq_done[l]),
      .root      (sq_root[l]),
      .remainder (sq_rem[l])
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        sq_special_q[l]    <= '0;
        sq_is_special_q[l] <= 1'b0;
        sq_exp_q[l]        <= '0;
      end else if (sq_start) begin
        sq_special_q[l]    <= sq_special[l];
        sq_is_special_q[l] <= sq_is_special[l];
        sq_exp_q[l]        <= sq_exp[l];
      end
    end
  end

  vec_t sq_y;
  always_comb begin
    for (int l = 0; l < NUM_LANES; l++) begin
      sq_y[l] = sq_is_special_q[l] ? sq_special_q[l]
              : {1'b0, sq_exp_q[l], 23'(sq_root[l][RB-2:0]) << (24 - RB)};
    end
  end

  // ---------------- result selection -------------------------------------
  logic sqrt_result;   // the last started operation was a square root
  always_ff @(posedge clk) begin
    if (rst)        sqrt_result <= 1'b0;
    else if (start) sqrt_result <= (op == OP_SQRT);
  end

  always_comb begin
    if (sq_done[0] || (!start && sqrt_result)) begin
      result = sq_y;
    end else begin
      unique case (op)
        OP_MOV:  result = d1;
        OP_SUM:  result = {sum_y, d2[0], d2[1], d2[2]};
        default: result = lane_y;
      endcase
    end
  end

  assign done = (start && op != OP_SQRT) || sq_done[0];
  assign busy = sq_busy[0];

endmodule
