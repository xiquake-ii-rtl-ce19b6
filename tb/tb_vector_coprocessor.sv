// tb_vector_coprocessor: end-to-end test of the vector coprocessor.
//
// The testbench plays the PowerPC's auxiliary-processor side of the
// Fabric Co-processor Bus at the cycle level: it issues vector loads
// (data arriving a chosen number of cycles later), vector stores (with the
// transfer size appearing immediately or late) and UDIs (with writeback
// permission immediate, late, or as a single early pulse), one instruction
// at a time, the next one in the cycle after done. A shadow register file
// in the testbench tracks what every register must hold.
//
// Each round loads random vectors, runs a burst of back-to-back UDIs over
// all ten operations, stores every destination and compares the store data
// with the reference arithmetic (double precision truncated to single,
// with the same tolerances as the vector-unit test). Cycle counts checked:
// the first UDI of a burst completes one cycle after issue, every
// following one in its issue cycle, SQRT 13 cycles after issue, loads and
// stores in the cycle of their data / transfer size. A flushed square root
// must leave its destination unchanged. The testbench counts how often each
// mechanism occurred and fails if one never did. The design runs with all
// parameters at their defaults.
module tb_vector_coprocessor;
  import vpu_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  int checks = 0, failures = 0;
  int n_load = 0, n_store = 0, n_store_late = 0, n_first = 0, n_same = 0,
      n_sqrt = 0, n_wb_late = 0, n_wb_hold = 0, n_flush = 0;
  int n_op [10];

  logic          instr_valid, dec_load, dec_store, dec_udi_valid, flush, wb_ok, load_valid;
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
    .APUFCMDECUDIVALID(dec_udi_valid), .APUFCMFLUSH(flush),
    .APUFCMDECLDSTXFERSIZE(xfer), .APUFCMWRITEBACKOK(wb_ok),
    .APUFCMDECNONAUTON(1'b0), .APUFCMDECFPUOP(1'b0), .APUFCMENDIAN(1'b0),
    .APUFCMMSRFE0(1'b0), .APUFCMMSRFE1(1'b0), .APUFCMNEXTINSTRREADY(1'b1),
    .APUFCMOPERANDVALID(1'b0), .APUFCMRADATA(32'd0), .APUFCMRBDATA(32'd0),
    .APUFCMLOADDATA(load_data), .APUFCMLOADVALID(load_valid),
    .FCMAPUDONE(done), .FCMAPURESULTVALID(result_valid),
    .FCMAPUSLEEPNOTREADY(sleep_nr), .FCMAPUCONFIRMINSTR(confirm), .FCMAPUCR(cr),
    .FCMAPUEXCEPTION(exc), .FCMAPUFPSCRFEX(fex), .FCMAPURESULT(result_out),
    .FCMAPUSTOREDATA(store_data));

  vec_t shadow [32];

  function automatic logic [0:31] encode(input vpu_op_e op, input int rd, input int rs1, input int rs2);
    logic [0:31] w;
    w = '0;
    w[0:5]   = 6'd4;
    w[6:10]  = 5'(rd);
    w[11:15] = 5'(rs1);
    w[16:20] = 5'(rs2);
    w[21:25] = 5'(op);
    return w;
  endfunction

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

  task automatic idle_bus();
    instr_valid = 0; dec_load = 0; dec_store = 0; dec_udi_valid = 0; flush = 0;
    wb_ok = 0; load_valid = 0; xfer = 0; instruction = '0;
  endtask

  task automatic expect_cycles(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: done after %0d cycles, expected %0d", what, got, exp); end
  endtask

  // Load: data valid dly cycles after issue.
  task automatic do_load(input int rd, input vec_t v, input int dly);
    int c = 0;
    while (1) begin
      instr_valid = (c == 0); dec_load = (c == 0);
      instruction = encode(OP_ADD, rd, 0, 0);
      wb_ok = 1; load_valid = (c == dly); load_data = v;
      #1;
      if (done || c > 30) break;
      @(negedge clk); c++;
    end
    expect_cycles(c, dly, "load");
    shadow[rd] = v; n_load++;
    @(negedge clk); idle_bus();
  endtask

  // Store: transfer size appears dly cycles after issue.
  task automatic do_store(input int rs, input int dly, output vec_t v);
    int c = 0;
    while (1) begin
      instr_valid = (c == 0); dec_store = (c == 0);
      instruction = encode(OP_ADD, rs, 0, 0);
      wb_ok = 1; xfer = (c >= dly) ? 3'b100 : 3'b000;
      #1;
      if (done || c > 30) break;
      @(negedge clk); c++;
    end
    expect_cycles(c, dly, "store");
    v = vec_t'(store_data);
    n_store++; if (dly > 0) n_store_late++;
    @(negedge clk); idle_bus();
  endtask

  // UDI. wb_mode 0: permission from issue on; 1: from cycle wb; 2: a
  // one-cycle pulse at issue. exp is the expected completion cycle.
  task automatic do_udi(input vpu_op_e op, input int rd, input int rs1, input int rs2,
                        input int wb_mode, input int wb, input int exp);
    int c = 0;
    vec_t e;
    for (int l = 0; l < 4; l++) e[l] = ref_elem(op, shadow[rs1], shadow[rs2], l);
    while (1) begin
      instr_valid = (c == 0); dec_udi_valid = (c == 0);
      instruction = encode(op, rd, rs1, rs2);
      wb_ok = (wb_mode == 0) ? 1'b1 : (wb_mode == 1) ? (c >= wb) : (c == 0);
      #1;
      if (done || c > 40) break;
      @(negedge clk); c++;
    end
    expect_cycles(c, exp, op.name());
    if (c == 0) n_same++;
    if (c == 1 && op != OP_SQRT && wb_mode != 1) n_first++;
    if (op == OP_SQRT) n_sqrt++;
    if (wb_mode == 1 && wb > 0) n_wb_late++;
    if (wb_mode == 2 && c > 0) n_wb_hold++;
    n_op[int'(op)]++;
    shadow[rd] = e;   // reference value; compared through a store later
    @(negedge clk); idle_bus();
  endtask

  task automatic check_reg(input int r, input vpu_op_e op);
    vec_t v;
    do_store(r, $urandom_range(2), v);
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (!close(v[l], shadow[r][l], tol_of(op))) begin
        failures++;
        $display("FAIL %s r%0d lane %0d got %h exp %h", op.name(), r, l, v[l], shadow[r][l]);
      end
    end
    shadow[r] = v;   // continue from the value the hardware holds
  endtask

  initial begin
    vpu_op_e ops[10] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_MOV, OP_INV, OP_SQRT,
                         OP_SUM, OP_ITOF, OP_FTOI};
    foreach (n_op[k]) n_op[k] = 0;
    rst = 1; idle_bus(); load_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);

    for (int round = 0; round < 40; round++) begin
      vpu_op_e burst [6];
      int      dst [6];
      // Sources: r0..r7 random normal values, r8 integers, r9 positive.
      for (int r = 0; r < 10; r++) begin
        vec_t v;
        for (int l = 0; l < 4; l++) begin
          v[l] = rnd_fp(30);
          if (r == 8) v[l] = $urandom;
          if (r == 9) v[l][31] = 1'b0;
        end
        do_load(r, v, $urandom_range(3));
      end
      // Burst of back-to-back single-cycle UDIs into r16..r21.
      for (int k = 0; k < 6; k++) begin
        int o;
        do o = $urandom_range(9); while (ops[o] == OP_SQRT);
        burst[k] = ops[o];
        dst[k]   = 16 + k;
        do_udi(burst[k], dst[k], (burst[k] == OP_ITOF) ? 8 : $urandom_range(7),
               $urandom_range(7), (k == 0 && round % 3 == 2) ? 2 : 0, 0, (k == 0) ? 1 : 0);
      end
      for (int k = 0; k < 6; k++) check_reg(dst[k], burst[k]);
      // Square root of the positive vector.
      do_udi(OP_SQRT, 24, 9, 0, 2, 0, 13);
      check_reg(24, OP_SQRT);
      // A UDI whose writeback permission arrives late.
      begin
        int w = 1 + $urandom_range(3);
        do_udi(OP_MUL, 25, 0, 1, 1, w, w);
        check_reg(25, OP_MUL);
      end
      // A chain: the result of one UDI feeds the next.
      do_udi(OP_ADD, 26, 2, 3, 0, 0, 1);
      do_udi(OP_MUL, 27, 26, 4, 0, 0, 0);
      check_reg(27, OP_MUL);
      // A flushed square root leaves its destination alone.
      begin
        vec_t old_v, new_v;
        int   c = 0;
        old_v = shadow[27];
        while (c < 4) begin
          instr_valid = (c == 0); dec_udi_valid = (c == 0);
          instruction = encode(OP_SQRT, 27, 9, 0);
          wb_ok = 0; flush = (c == 3);
          #1;
          checks++;
          if (done) begin failures++; $display("FAIL done on flushed instruction"); end
          @(negedge clk); c++;
        end
        idle_bus();
        n_flush++;
        do_store(27, 0, new_v);
        checks++;
        if (new_v != old_v) begin failures++; $display("FAIL flushed sqrt changed r27"); end
      end
    end

    // Constant outputs of an autonomous-only coprocessor.
    checks++;
    if (result_valid || confirm || exc || fex || cr != 0 || result_out != 0) begin
      failures++; $display("FAIL constant outputs");
    end
    // Every mechanism must have happened.
    checks++;
    if (n_load == 0 || n_store == 0 || n_store_late == 0 || n_first == 0 || n_same == 0 ||
        n_sqrt == 0 || n_wb_late == 0 || n_wb_hold == 0 || n_flush == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    foreach (n_op[k]) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("FAIL op %0d never run", k); end
    end
    $display("loads %0d stores %0d (late size %0d) first-UDI %0d same-cycle %0d sqrt %0d late-wb %0d held-wb %0d flush %0d",
             n_load, n_store, n_store_late, n_first, n_same, n_sqrt, n_wb_late, n_wb_hold, n_flush);
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
