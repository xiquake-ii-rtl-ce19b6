// tb_fp_unit: self-checking test of one floating-point lane.
//
// For each of the six lane operations, random normal operands are applied
// and the result is compared with the testbench's double-precision
// reference truncated to single precision (within one unit in the last
// place, which covers double rounding in the reference). Conversions are
// checked exactly. A set of directed cases covers zero results, division
// by zero, NaN and infinity and the integer limits. The lane is
// combinational, so every result is checked in the cycle its operands are
// applied.
module tb_fp_unit;
  import vpu_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  lane_op_e op;
  fp32_t    a, b, y;

  fp_unit dut (.op(op), .a(a), .b(b), .y(y));

  task automatic apply(input lane_op_e o, input fp32_t x, input fp32_t z,
                       input fp32_t exp, input int tol, input string tag);
    op = o; a = x; b = z;
    @(negedge clk);
    checks++;
    if (!close(y, exp, tol)) begin
      failures++;
      $display("FAIL %s a=%h b=%h y=%h exp=%h", tag, x, z, y, exp);
    end
  endtask

  initial begin
    fp32_t x, z;
    int    iv;
    for (int i = 0; i < 1000; i++) begin
      x = rnd_fp(40); z = rnd_fp(40);
      if (i % 4 == 0) z = {z[31], x[30:23] - 8'($urandom_range(3)), z[22:0]};  // close exponents
      apply(LANE_ADD, x, z, r2f(f2r(x) + f2r(z)), 1, "add");
      apply(LANE_SUB, x, z, r2f(f2r(x) - f2r(z)), 1, "sub");
      apply(LANE_MUL, x, z, r2f(f2r(x) * f2r(z)), 0, "mul");
      apply(LANE_DIV, x, z, r2f(f2r(x) / f2r(z)), 1, "div");
      iv = int'($urandom);
      if (i % 3 == 0) iv = iv >>> $urandom_range(30);
      apply(LANE_ITOF, fp32_t'(iv), '0, r2f(real'(iv)), 0, "itof");
      x = rnd_fp(30);
      apply(LANE_FTOI, x, '0, fp32_t'($rtoi(f2r(x))), 0, "ftoi");
    end
    // Directed cases.
    apply(LANE_ADD, 32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000, 0, "x-x");
    apply(LANE_SUB, 32'h4040_0000, 32'h4040_0000, 32'h0000_0000, 0, "3-3");
    apply(LANE_ADD, 32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000, 0, "1+1");
    apply(LANE_SUB, 32'h3F80_0000, 32'h3380_0000, 32'h3F7F_FFFF, 0, "1-2^-24 trunc");
    apply(LANE_ADD, 32'h3F80_0000, 32'h0000_0000, 32'h3F80_0000, 0, "1+0");
    apply(LANE_MUL, 32'h4040_0000, 32'h0000_0000, 32'h0000_0000, 0, "3*0");
    apply(LANE_MUL, 32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000, 0, "mul ovf");
    apply(LANE_DIV, 32'h3F80_0000, 32'h0000_0000, 32'h7F80_0000, 0, "1/0");
    apply(LANE_DIV, 32'h0000_0000, 32'h0000_0000, FP_QNAN, 0, "0/0");
    apply(LANE_DIV, 32'h40C0_0000, 32'h4040_0000, 32'h4000_0000, 0, "6/3");
    apply(LANE_DIV, 32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAA, 0, "1/3 trunc");
    apply(LANE_ADD, 32'h7F80_0000, 32'hFF80_0000, FP_QNAN, 0, "inf-inf");
    apply(LANE_ITOF, 32'h8000_0000, '0, 32'hCF00_0000, 0, "itof min");
    apply(LANE_ITOF, 32'h0000_0000, '0, 32'h0000_0000, 0, "itof 0");
    apply(LANE_ITOF, 32'hFFFF_FFFF, '0, 32'hBF80_0000, 0, "itof -1");
    apply(LANE_FTOI, 32'hC0F0_0000, '0, 32'hFFFF_FFF9, 0, "ftoi -7.5");
    apply(LANE_FTOI, 32'h5F00_0000, '0, 32'h7FFF_FFFF, 0, "ftoi sat");
    apply(LANE_FTOI, 32'h3F00_0000, '0, 32'h0000_0000, 0, "ftoi 0.5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
