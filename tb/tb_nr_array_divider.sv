// tb_nr_array_divider: self-checking test of the nonrestoring array divider.
//
// Checks the 4x4 default array exhaustively over every dividend/divisor
// pair whose quotient fits, and the 24-bit/26-row array used for
// floating-point significands with random operands in the range the
// divider sees there (dividend = m_a << 25, divisor = m_b, both 24-bit
// significands with the leading one set). Expected quotients and
// remainders come from the integer / and % operators; a negative raw
// remainder must equal the true remainder minus the divisor.
module tb_nr_array_divider;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Small array, exhaustive.
  logic [6:0] z4;
  logic [3:0] d4, q4;
  logic [5:0] r4;
  nr_array_divider dut4 (.z(z4), .d(d4), .q(q4), .rem(r4));

  // Floating-point significand array.
  logic [48:0] zf;
  logic [23:0] df;
  logic [25:0] qf, rf;
  nr_array_divider #(.N(24), .Q(26)) dutf (.z(zf), .d(df), .q(qf), .rem(rf));

  task automatic check_rem(input longint zz, input longint dd, input longint qq,
                           input longint raw, input int w, input string tag);
    longint expq, expr, rs;
    expq = zz / dd;
    expr = zz % dd;
    // sign-extend raw remainder of width w
    rs = raw;
    if (raw[w-1]) rs = raw - (longint'(1) << w);
    checks++;
    if (qq != expq || (rs < 0 ? rs + dd : rs) != expr) begin
      failures++;
      $display("FAIL %s z=%0d d=%0d q=%0d (exp %0d) rem=%0d (exp %0d)",
               tag, zz, dd, qq, expq, rs, expr);
    end
  endtask

  initial begin
    for (int d = 1; d < 16; d++) begin
      for (int z = 0; z < 128; z++) begin
        if (z < d * 16) begin
          z4 = 7'(z); d4 = 4'(d);
          #1;
          check_rem(z, d, q4, r4, 6, "4x4");
        end
      end
    end
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] ma, mb;
      ma = {1'b1, 23'($urandom)};
      mb = {1'b1, 23'($urandom)};
      if (i == 0) begin ma = 24'h800000; mb = 24'h800000; end
      if (i == 1) begin ma = 24'hFFFFFF; mb = 24'h800000; end
      if (i == 2) begin ma = 24'h800000; mb = 24'hFFFFFF; end
      zf = {ma, 25'd0}; df = mb;
      #1;
      check_rem(longint'(zf), longint'(df), longint'(qf), longint'(rf), 26, "fp");
    end
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
