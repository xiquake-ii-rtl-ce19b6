// fp_unit: one single-precision floating-point lane of the vector unit.
//
// A purely combinational unit that performs one of six operations on a
// pair of 32-bit operands: add, subtract, multiply, divide, signed
// integer to float and float to signed integer (the conversions use a
// only). The vector unit instantiates four of these, one per element.
// Every operation completes in the cycle its operands are presented.
//
// Four floating-point lanes as the core of the vector unit, single-cycle
// operation, and division by a combinational array divider follow the
// original design. The arithmetic itself (truncating rounding, flushing
// of subnormals) is this design's own implementation.
module fp_unit
  import vpu_pkg::*;
(
  input  lane_op_e op,
  input  fp32_t    a,
  input  fp32_t    b,
  output fp32_t    y
);

  fp32_t y_add, y_mul, y_div, y_cvt;

  fp_addsub u_addsub (.a(a), .b(b), .sub(op == LANE_SUB), .y(y_add));
  fp_mul    u_mul    (.a(a), .b(b), .y(y_mul));
  fp_div    u_div    (.a(a), .b(b), .y(y_div));
  fp_cvt    u_cvt    (.a(a), .to_float(op == LANE_ITOF), .y(y_cvt));

  always_comb begin
    unique case (op)
      LANE_ADD, LANE_SUB:   y = y_add;
      LANE_MUL:             y = y_mul;
      LANE_DIV:             y = y_div;
      LANE_ITOF, LANE_FTOI: y = y_cvt;
      default:              y = '0;
    endcase
  end

endmodule
