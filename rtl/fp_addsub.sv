// fp_addsub: combinational IEEE-754 single-precision adder/subtractor.
//
// Computes a + b, or a - b when sub is set. The operand with the larger
// magnitude is kept, the other is shifted right by the exponent difference
// into a 50-bit field with a sticky bit, the two are added or subtracted,
// and the result is normalised with a leading-one search and truncated
// (round toward zero). Subnormal inputs are read as zero and results below
// the normal range flush to zero; results above it become infinity. NaN or
// infinite inputs give the usual IEEE special results.
//
// Rounding, subnormal and overflow handling are this design's choices: the
// coprocessor only specifies element-wise single-precision addition and
// subtraction.
module fp_addsub
  import vpu_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  logic        sa, sb, sx, sy, eff_sub, swap;
  logic [7:0]  ea, eb, ex, ey;
  logic [23:0] ma, mb, mx, my;
  logic [7:0]  dexp;
  logic [49:0] fx, fy, fy_sh;
  logic        sticky;
  logic [50:0] sum;
  int          lead;
  int          e_res;
  logic [50:0] norm;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};

    // Larger magnitude first.
    swap = {eb, mb} > {ea, ma};
    sx = swap ? sb : sa;   sy = swap ? sa : sb;
    ex = swap ? eb : ea;   ey = swap ? ea : eb;
    mx = swap ? mb : ma;   my = swap ? ma : mb;
    eff_sub = sx ^ sy;
    dexp = ex - ey;

    fx = {mx, 26'd0};
    fy = {my, 26'd0};
    if (dexp >= 8'd50) begin
      fy_sh  = '0;
      sticky = |my;
    end else begin
      fy_sh  = fy >> dexp;
      sticky = |(fy & ((50'd1 << dexp) - 50'd1));
    end
    fy_sh[0] = fy_sh[0] | sticky;

    sum = eff_sub ? ({1'b0, fx} - {1'b0, fy_sh}) : ({1'b0, fx} + {1'b0, fy_sh});

    lead = -1;
    for (int i = 0; i <= 50; i++) begin
      if (sum[i]) lead = i;
    end

    // The leading one of fx sits at bit 49; bit 50 is the carry.
    e_res = int'(ex) + lead - 49;
    norm  = (lead >= 0) ? (sum << (50 - lead)) : '0;   // leading one to bit 50

    if (ea == 8'hFF || eb == 8'hFF) begin
      if ((ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0))
        y = FP_QNAN;
      else if (ea == 8'hFF && eb == 8'hFF && (sa != sb))
        y = FP_QNAN;
      else
        y = {(ea == 8'hFF) ? sa : sb, 8'hFF, 23'd0};
    end else if (lead < 0) begin
      y = (sa & sb) ? 32'h8000_0000 : 32'd0;
    end else if (e_res <= 0) begin
      y = {sx, 31'd0};
    end else if (e_res >= 255) begin
      y = {sx, 8'hFF, 23'd0};
    end else begin
      y = {sx, e_res[7:0], norm[49:27]};
    end
  end

endmodule
