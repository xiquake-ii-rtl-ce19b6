// fp_cvt: combinational conversions between signed 32-bit integers and
// IEEE-754 single precision.
//
// to_float = 1: the integer a is converted to floating point; the
// magnitude is normalised with a leading-one search and truncated to 24
// significant bits (round toward zero).
// to_float = 0: the float a is converted to an integer, truncating toward
// zero. Magnitudes of 2**31 and above, infinities and NaN saturate to
// 32'h7FFFFFFF or 32'h80000000 by sign (NaN gives 32'h7FFFFFFF).
// Rounding and saturation are this design's choices.
module fp_cvt
  import vpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic        to_float,
  output logic [31:0] y
);

  logic [31:0] mag, norm;
  int          lead;
  int          e;
  logic [55:0] shifted;

  always_comb begin
    y = '0;
    mag = '0; norm = '0; lead = -1; e = 0; shifted = '0;
    if (to_float) begin
      mag = a[31] ? (~a + 32'd1) : a;
      for (int i = 0; i < 32; i++) begin
        if (mag[i]) lead = i;
      end
      if (lead < 0) begin
        y = '0;
      end else begin
        norm = mag << (31 - lead);                 // leading one to bit 31
        y = {a[31], 8'(127 + lead), norm[30:8]};
      end
    end else begin
      e = int'(a[30:23]) - 127;
      if (a[30:23] == 8'hFF && a[22:0] != 0) begin
        y = 32'h7FFF_FFFF;
      end else if (e < 0) begin
        y = '0;
      end else if (e >= 31) begin
        y = a[31] ? 32'h8000_0000 : 32'h7FFF_FFFF;
      end else begin
        shifted = {32'd0, 1'b1, a[22:0]} << e;     // value * 2**23
        mag = shifted[54:23];
        y = a[31] ? (~mag + 32'd1) : mag;
      end
    end
  end

endmodule
