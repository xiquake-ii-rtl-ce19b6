// tb_vreg_file: self-checking test of the 32 x 128-bit register file.
//
// Keeps a shadow copy of all registers. Writes random data to every
// register, then performs random writes and reads on both ports, checking
// that reads are asynchronous (data for a new address is valid in the same
// cycle, before any clock edge), that a write takes effect at the clock
// edge and not before, and that disabled writes change nothing.
module tb_vreg_file;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         we;
  logic [4:0]   waddr, raddr1, raddr2;
  logic [127:0] wdata, rdata1, rdata2;
  logic [127:0] shadow [32];

  vreg_file dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                 .raddr1(raddr1), .rdata1(rdata1), .raddr2(raddr2), .rdata2(rdata2));

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check_reads();
    checks += 2;
    if (rdata1 !== shadow[raddr1]) begin failures++; $display("FAIL port1 r%0d", raddr1); end
    if (rdata2 !== shadow[raddr2]) begin failures++; $display("FAIL port2 r%0d", raddr2); end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr1 = '0; raddr2 = '0;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1'b1; waddr = 5'(r); wdata = rnd128(); shadow[r] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      raddr1 = 5'($urandom); raddr2 = 5'($urandom);
      #1 check_reads();                       // same-cycle (asynchronous) read
      we = 1'($urandom); waddr = 5'($urandom); wdata = rnd128();
      if (i % 5 == 0) begin raddr1 = waddr; end
      #1 check_reads();                       // old value before the edge
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      check_reads();                          // new value after the edge
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
