// tb_result_hold: self-checking test of the result-hold register.
//
// Drives random sequences of vector-unit results, write-backs (consume)
// and flushes against a cycle-accurate reference model kept in the
// testbench: the output must pass the live result through while nothing is
// held, capture a result that is not consumed in its cycle, present it
// until it is consumed or flushed, and ignore new results while full.
module tb_result_hold;
  import vpu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  int checks = 0, failures = 0;
  int captures = 0;

  logic flush, vpu_done, consume, ready;
  vec_t vpu_result, result;

  result_hold dut (.clk(clk), .rst(rst), .flush(flush), .vpu_done(vpu_done),
                   .vpu_result(vpu_result), .consume(consume), .result(result), .ready(ready));

  logic m_ready;
  vec_t m_held;

  initial begin
    rst = 1'b1; flush = 1'b0; vpu_done = 1'b0; consume = 1'b0; vpu_result = '0;
    m_ready = 1'b0; m_held = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      vpu_done   = ($urandom_range(2) == 0);
      consume    = ($urandom_range(2) == 0);
      flush      = ($urandom_range(20) == 0);
      vpu_result = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks += 2;
      if (ready !== m_ready) begin failures++; $display("FAIL ready %0d exp %0d", ready, m_ready); end
      if (result !== (m_ready ? m_held : vpu_result)) begin failures++; $display("FAIL result"); end
      @(posedge clk);
      if (flush) m_ready = 1'b0;
      else if (consume) m_ready = 1'b0;
      else if (vpu_done && !m_ready) begin m_ready = 1'b1; m_held = vpu_result; captures++; end
    end
    checks++;
    if (captures == 0) begin failures++; $display("FAIL no capture happened"); end
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
