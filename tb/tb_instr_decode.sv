// tb_instr_decode: self-checking test of the instruction register and
// decoder.
//
// Presents random instruction words with and without the load strobe and
// checks the rd, rs1, rs2 and opcode fields against bit slices taken in
// the testbench (PowerPC numbering: rd = bits 6..10, rs1 = 11..15,
// rs2 = 16..20, op = 21..25): in the load cycle the fields must come from
// the bus word, afterwards from the stored word even when the bus changes.
module tb_instr_decode;
  import vpu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  int checks = 0, failures = 0;

  logic        load;
  logic [31:0] bus;        // bit 31 here is PowerPC bit 0
  logic [0:31] instr;
  vreg_addr_t  rd, rs1, rs2;
  vpu_op_e     op;
  logic [31:0] stored;

  instr_decode dut (.clk(clk), .rst(rst), .load(load), .instr_in(bus),
                    .instr(instr), .rd(rd), .rs1(rs1), .rs2(rs2), .op(op));

  task automatic check(input logic [31:0] w);
    checks += 4;
    if (rd  !== w[25:21]) begin failures++; $display("FAIL rd %0d %h", rd, w); end
    if (rs1 !== w[20:16]) begin failures++; $display("FAIL rs1 %0d %h", rs1, w); end
    if (rs2 !== w[15:11]) begin failures++; $display("FAIL rs2 %0d %h", rs2, w); end
    if (5'(op) !== w[10:6]) begin failures++; $display("FAIL op %0d %h", op, w); end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; bus = '0; stored = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      bus  = $urandom;
      #1;
      check(load ? bus : stored);
      @(posedge clk);
      if (load) stored = bus;
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
