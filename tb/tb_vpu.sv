// tb_vpu: self-checking test of the four-lane vector unit.
//
// Every operation is applied to random vectors and each of the four result
// elements is compared with the testbench's reference (double precision
// truncated to single; one unit in the last place of tolerance, two for
// SUM which rounds twice, and one unit of the 12-bit root fraction for
// SQRT). Timing checks: done must come in the cycle of start for every
// operation but SQRT, and exactly 13 cycles after start for SQRT, with
// busy high in between; an aborted square root must never raise done.
module tb_vpu;
  import vpu_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  int checks = 0, failures = 0;

  vpu_op_e op;
  logic    start, cancel, done, busy;
  vec_t    d1, d2, result;

  vpu dut (.clk(clk), .rst(rst), .op(op), .start(start), .cancel(cancel),
           .d1(d1), .d2(d2), .result(result), .done(done), .busy(busy));

  function automatic fp32_t ref_elem(input vpu_op_e o, input vec_t a, input vec_t b, input int l);
    case (o)
      OP_ADD:  return r2f(f2r(a[l]) + f2r(b[l]));
      OP_SUB:  return r2f(f2r(a[l]) - f2r(b[l]));
      OP_MUL:  return r2f(f2r(a[l]) * f2r(b[l]));
      OP_DIV:  return r2f(f2r(a[l]) / f2r(b[l]));
      OP_MOV:  return a[l];
      OP_INV:  return r2f(1.0 / f2r(a[l]));
      OP_SQRT: return (a[l][31] && a[l][30:23] != 0) ? FP_QNAN
                    : (r2f($sqrt(f2r(a[l]))) & 32'hFFFF_F800);
      OP_SUM:  return (l == 0) ? r2f(f2r(r2f(f2r(a[0]) + f2r(a[1]))) + f2r(r2f(f2r(a[2]) + f2r(a[3]))))
                               : b[l-1];
      OP_ITOF: return r2f(real'(int'(a[l])));
      OP_FTOI: return fp32_t'($rtoi(f2r(a[l])));
      default: return '0;
    endcase
  endfunction

  function automatic int tol_of(input vpu_op_e o);
    case (o)
      OP_SUM:  return 2;
      OP_SQRT: return 2048;
      OP_MUL, OP_MOV, OP_ITOF, OP_FTOI: return 0;
      default: return 1;
    endcase
  endfunction

  task automatic run(input vpu_op_e o, input vec_t a, input vec_t b);
    int lat;
    vec_t exp_v;
    @(negedge clk);
    op = o; d1 = a; d2 = b; start = 1'b1;
    for (int l = 0; l < 4; l++) exp_v[l] = ref_elem(o, a, b, l);
    #1;
    lat = 0;
    if (o != OP_SQRT) begin
      checks++;
      if (!done) begin failures++; $display("FAIL %s: no same-cycle done", o.name()); end
    end else begin
      @(negedge clk); start = 1'b0; d1 = '0; lat = 1;
      while (!done && lat < 30) begin
        if (!busy) begin failures++; $display("FAIL busy low"); end
        @(negedge clk); lat++;
      end
      checks++;
      if (lat != 13) begin failures++; $display("FAIL sqrt latency %0d", lat); end
    end
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (!close(result[l], exp_v[l], tol_of(o))) begin
        failures++;
        $display("FAIL %s lane %0d a=%h b=%h y=%h exp=%h", o.name(), l, a[l], b[l], result[l], exp_v[l]);
      end
    end
    @(negedge clk); start = 1'b0;
  endtask

  initial begin
    vec_t a, b;
    vpu_op_e ops[10] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_MOV, OP_INV, OP_SQRT,
                         OP_SUM, OP_ITOF, OP_FTOI};
    rst = 1'b1; start = 1'b0; cancel = 1'b0; op = OP_ADD; d1 = '0; d2 = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 60; i++) begin
      foreach (ops[k]) begin
        for (int l = 0; l < 4; l++) begin
          a[l] = rnd_fp(30);
          b[l] = rnd_fp(30);
          if (ops[k] == OP_SQRT && l < 2) a[l][31] = 1'b0;
          if (ops[k] == OP_ITOF) a[l] = $urandom;
        end
        run(ops[k], a, b);
      end
    end
    // Directed: sqrt of 4, 2, 0, -1.
    run(OP_SQRT, {32'h4080_0000, 32'h4000_0000, 32'h0000_0000, 32'hBF80_0000}, '0);
    // Aborted square root: no done afterwards.
    @(negedge clk); op = OP_SQRT; d1 = {4{32'h4080_0000}}; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (3) @(negedge clk);
    cancel = 1'b1;
    @(negedge clk); cancel = 1'b0;
    begin
      bit seen = 0;
      repeat (15) begin @(negedge clk); if (done) seen = 1; end
      checks++;
      if (seen || busy) begin failures++; $display("FAIL done/busy after cancel"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
