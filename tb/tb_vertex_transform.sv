// tb_vertex_transform: 4x4 matrix times vector on the vector coprocessor.
//
// The graphics kernel the coprocessor is meant for: transforming vertices
// by a 4x4 matrix. The four matrix rows are loaded into r0..r3. For each
// vertex v (loaded into r4) the program runs, for i = 3 down to 0,
//   MUL r11 = row_i * v            element-wise products
//   SUM r10 = [sum(r11), r10[0..2]] dot product, previous ones shift down
// so that after four rows r10 = [row0.v, row1.v, row2.v, row3.v], and
// stores r10. The eight UDIs run back to back: the first completes one
// cycle after issue and the other seven in their issue cycles, so one
// vertex costs 9 cycles of UDIs; the testbench checks this count. Results
// are compared with a reference that follows the same operation order in
// double precision, truncated to single after every operation, within
// four units in the last place. Positive operands avoid cancellation.
module tb_vertex_transform;
  import vpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int NVERT = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  int checks = 0, failures = 0;

  logic          instr_valid, dec_load, dec_store, dec_udi_valid, load_valid;
  logic [0:31]   instruction;
  logic [0:2]    xfer;
  logic [0:127]  load_data;
  logic          done, result_valid, sleep_nr, confirm, exc, fex;
  logic [0:3]    cr;
  logic [0:31]   result_out;
  logic [0:127]  store_data;

  vector_coprocessor dut (
    .clk(clk), .rst(rst),
    .APUFCMINSTRVALID(instr_valid), .APUFCMINSTRUCTION(instruction),
    .APUFCMDECLOAD(dec_load), .APUFCMDECSTORE(dec_store), .APUFCMDECUDI(4'd0),
    .APUFCMDECUDIVALID(dec_udi_valid), .APUFCMFLUSH(1'b0),
    .APUFCMDECLDSTXFERSIZE(xfer), .APUFCMWRITEBACKOK(1'b1),
    .APUFCMDECNONAUTON(1'b0), .APUFCMDECFPUOP(1'b0), .APUFCMENDIAN(1'b0),
    .APUFCMMSRFE0(1'b0), .APUFCMMSRFE1(1'b0), .APUFCMNEXTINSTRREADY(1'b1),
    .APUFCMOPERANDVALID(1'b0), .APUFCMRADATA(32'd0), .APUFCMRBDATA(32'd0),
    .APUFCMLOADDATA(load_data), .APUFCMLOADVALID(load_valid),
    .FCMAPUDONE(done), .FCMAPURESULTVALID(result_valid),
    .FCMAPUSLEEPNOTREADY(sleep_nr), .FCMAPUCONFIRMINSTR(confirm), .FCMAPUCR(cr),
    .FCMAPUEXCEPTION(exc), .FCMAPUFPSCRFEX(fex), .FCMAPURESULT(result_out),
    .FCMAPUSTOREDATA(store_data));

  function automatic logic [0:31] encode(input vpu_op_e op, input int rd, input int rs1, input int rs2);
    logic [0:31] w;
    w = '0;
    w[0:5] = 6'd4; w[6:10] = 5'(rd); w[11:15] = 5'(rs1); w[16:20] = 5'(rs2); w[21:25] = 5'(op);
    return w;
  endfunction

  task automatic idle_bus();
    instr_valid = 0; dec_load = 0; dec_store = 0; dec_udi_valid = 0;
    load_valid = 0; xfer = 0; instruction = '0;
  endtask

  // Each task returns the number of cycles from issue to done, leaving the
  // bus idle at the start of the next cycle.
  task automatic do_load(input int rd, input vec_t v, output int cyc);
    cyc = 0;
    while (1) begin
      instr_valid = (cyc == 0); dec_load = (cyc == 0);
      instruction = encode(OP_ADD, rd, 0, 0);
      load_valid = (cyc == 1); load_data = v;
      #1;
      if (done || cyc > 20) break;
      @(negedge clk); cyc++;
    end
    @(negedge clk); idle_bus();
  endtask

  task automatic do_store(input int rs, output vec_t v, output int cyc);
    cyc = 0;
    while (1) begin
      instr_valid = (cyc == 0); dec_store = (cyc == 0);
      instruction = encode(OP_ADD, rs, 0, 0);
      xfer = 3'b100;
      #1;
      if (done || cyc > 20) break;
      @(negedge clk); cyc++;
    end
    v = vec_t'(store_data);
    @(negedge clk); idle_bus();
  endtask

  task automatic do_udi(input vpu_op_e op, input int rd, input int rs1, input int rs2, output int cyc);
    cyc = 0;
    while (1) begin
      instr_valid = (cyc == 0); dec_udi_valid = (cyc == 0);
      instruction = encode(op, rd, rs1, rs2);
      #1;
      if (done || cyc > 40) break;
      @(negedge clk); cyc++;
    end
    @(negedge clk); idle_bus();
  endtask

  function automatic fp32_t ref_dot(input vec_t row, input vec_t v);
    fp32_t p [4];
    for (int l = 0; l < 4; l++) p[l] = r2f(f2r(row[l]) * f2r(v[l]));
    return r2f(f2r(r2f(f2r(p[0]) + f2r(p[1]))) + f2r(r2f(f2r(p[2]) + f2r(p[3]))));
  endfunction

  function automatic fp32_t rnd_pos();
    fp32_t x = rnd_fp(8);
    x[31] = 1'b0;
    return x;
  endfunction

  initial begin
    vec_t m [4];
    int   cyc, udi_cycles;
    rst = 1; idle_bus(); load_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int r = 0; r < 4; r++) begin
      for (int l = 0; l < 4; l++) m[r][l] = rnd_pos();
      do_load(r, m[r], cyc);
    end
    for (int n = 0; n < NVERT; n++) begin
      vec_t v, t;
      for (int l = 0; l < 4; l++) v[l] = rnd_pos();
      do_load(4, v, cyc);
      udi_cycles = 0;
      for (int i = 3; i >= 0; i--) begin
        do_udi(OP_MUL, 11, i, 4, cyc);  udi_cycles += cyc + 1;
        do_udi(OP_SUM, 10, 11, 10, cyc); udi_cycles += cyc + 1;
      end
      checks++;
      if (udi_cycles != 9) begin failures++; $display("FAIL vertex %0d took %0d UDI cycles", n, udi_cycles); end
      do_store(10, t, cyc);
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (!close(t[l], ref_dot(m[l], v), 4)) begin
          failures++;
          $display("FAIL vertex %0d element %0d got %h exp %h", n, l, t[l], ref_dot(m[l], v));
        end
      end
    end
    $display("%0d vertices transformed, 9 cycles of UDIs each", NVERT);
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
