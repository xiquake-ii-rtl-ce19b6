// tb_sqrt_nonrestoring: self-checking test of the iterative square root.
//
// Runs the default 32-bit unit and the 26-bit configuration used by the
// vector unit on corner and random radicands, comparing root and remainder
// with an integer square root computed by bisection in the testbench. Also
// checks the latency: done must rise exactly W/2 cycles after the start
// cycle (16 and 13 cycles), and busy must be high in between.
module tb_sqrt_nonrestoring;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  int checks = 0, failures = 0;

  logic        st32, st26;
  logic [31:0] rad32;
  logic [25:0] rad26;
  logic        busy32, done32, busy26, done26;
  logic [15:0] root32;
  logic [16:0] rem32;
  logic [12:0] root26;
  logic [13:0] rem26;

  sqrt_nonrestoring dut32 (.clk(clk), .rst(rst), .start(st32), .cancel(1'b0),
    .radicand(rad32), .busy(busy32), .done(done32), .root(root32), .remainder(rem32));
  sqrt_nonrestoring #(.W(26)) dut26 (.clk(clk), .rst(rst), .start(st26), .cancel(1'b0),
    .radicand(rad26), .busy(busy26), .done(done26), .root(root26), .remainder(rem26));

  function automatic longint isqrt(longint v);
    longint lo = 0, hi = 1 << 17, mid;
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      if (mid * mid <= v) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  task automatic run32(input logic [31:0] v);
    int lat = 0;
    longint er;
    @(negedge clk); rad32 = v; st32 = 1'b1;
    @(negedge clk); st32 = 1'b0; rad32 = $urandom;  // operand needed only at start
    lat = 1;
    while (!done32 && lat < 40) begin
      if (!busy32) begin failures++; $display("FAIL busy low during run"); end
      @(negedge clk); lat++;
    end
    er = isqrt(longint'(v));
    checks += 2;
    if (lat != 16) begin failures++; $display("FAIL latency32 %0d", lat); end
    if (longint'(root32) != er || longint'(rem32) != longint'(v) - er*er) begin
      failures++;
      $display("FAIL sqrt32(%0d) root=%0d rem=%0d exp %0d", v, root32, rem32, er);
    end
  endtask

  task automatic run26(input logic [25:0] v);
    int lat = 0;
    longint er;
    @(negedge clk); rad26 = v; st26 = 1'b1;
    @(negedge clk); st26 = 1'b0;
    lat = 1;
    while (!done26 && lat < 40) begin @(negedge clk); lat++; end
    er = isqrt(longint'(v));
    checks += 2;
    if (lat != 13) begin failures++; $display("FAIL latency26 %0d", lat); end
    if (longint'(root26) != er || longint'(rem26) != longint'(v) - er*er) begin
      failures++;
      $display("FAIL sqrt26(%0d) root=%0d rem=%0d exp %0d", v, root26, rem26, er);
    end
  endtask

  initial begin
    rst = 1'b1; st32 = 1'b0; st26 = 1'b0; rad32 = '0; rad26 = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run32(0); run32(1); run32(2); run32(3); run32(4); run32(99); run32(100);
    run32(32'hFFFF_FFFF); run32(32'hFFFE_0001); run32(32'h8000_0000);
    for (int i = 0; i < 300; i++) run32($urandom);
    run26(0); run26(26'h3FF_FFFF); run26(26'h100_0000);
    for (int i = 0; i < 300; i++) run26(26'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
