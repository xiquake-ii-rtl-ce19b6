// fp_div: combinational IEEE-754 single-precision divider.
//
// The significand quotient comes from a nonrestoring array divider
// (nr_array_divider, 24-bit divisor, 26 quotient rows): the dividend is
// the 24-bit significand of a shifted left by 25, so the 26-bit quotient
// has its leading one at bit 25 or 24 and carries 23 fraction bits after
// normalisation. The result is truncated (round toward zero). Exponents are
// subtracted and rebiased separately. Subnormal inputs read as zero,
// results below the normal range flush to zero, results above it become
// infinity; x/0 = inf, 0/0, inf/inf and NaN operands give NaN.
//
// Using a combinational array divider for the significand follows the
// original design; its size and the range handling are this design's.
module fp_div
  import vpu_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [48:0] z;
  logic [25:0] qt;
  logic [25:0] rem_unused;
  int          e_res;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  assign ma = {1'b1, a[22:0]};
  assign mb = {1'b1, b[22:0]};
  assign z  = {ma, 25'd0};

  nr_array_divider #(.N(24), .Q(26)) u_sig_div (
    .z   (z),
    .d   (mb),
    .q   (qt),
    .rem (rem_unused)
  );

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
    e_res  = int'(ea) - int'(eb) + 127 - (qt[25] ? 0 : 1);

    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf))
      y = FP_QNAN;
    else if (a_inf || b_zero)
      y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_inf || e_res <= 0)
      y = {s, 31'd0};
    else if (e_res >= 255)
      y = {s, 8'hFF, 23'd0};
    else
      y = {s, e_res[7:0], qt[25] ? qt[24:2] : qt[23:1]};
  end

endmodule
