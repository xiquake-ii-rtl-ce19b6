// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// Multiplies the two 24-bit significands into a 48-bit product, normalises
// by at most one place and truncates (round toward zero). Subnormal inputs
// read as zero; results below the normal range flush to zero and results
// above it become infinity. NaN and infinity follow IEEE (inf * 0 = NaN).
// Rounding and range handling are this design's choices.
module fp_mul
  import vpu_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] p;
  int          e_res;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != 0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 0);
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    p  = ma * mb;
    e_res = int'(ea) + int'(eb) - 127 + (p[47] ? 1 : 0);

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = FP_QNAN;
    else if (a_inf || b_inf)
      y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero || e_res <= 0)
      y = {s, 31'd0};
    else if (e_res >= 255)
      y = {s, 8'hFF, 23'd0};
    else
      y = {s, e_res[7:0], p[47] ? p[46:24] : p[45:23]};
  end

endmodule
