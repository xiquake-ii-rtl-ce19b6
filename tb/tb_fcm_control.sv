// tb_fcm_control: self-checking test of the coprocessor controller.
//
// The testbench plays the processor side and a vector unit whose latency
// it chooses (0 = combinational, as for all operations but square root,
// or several cycles). Random instruction streams of UDIs, loads and stores
// are issued, each with its own writeback-permission cycle (as a level from
// that cycle on, or as a one-cycle pulse that the controller must
// remember), load-data cycle and transfer-size cycle, and some are flushed.
// For every instruction the cycle of done is compared with the expected
// one:
//   UDI    max(result cycle, writeback cycle, 1 if it is the first UDI of a
//          sequence else 0)
//   LOAD   the load-data cycle;  STORE  the first cycle with a non-zero
//          transfer size;  flushed  never.
// Also checked: write_enable only with done of a UDI or load, rd_mode on
// loads, rs1rd on stores, exactly one vpu_start per UDI. Counts of each
// mechanism (same-cycle UDI, two-cycle first UDI, held writeback, delayed
// store size, flush, multi-cycle unit) must all be non-zero.
module tb_fcm_control;
  import vpu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  int checks = 0, failures = 0;
  int n_same = 0, n_first = 0, n_wbhold = 0, n_stdelay = 0, n_flush = 0, n_long = 0;

  logic       instr_valid, dec_load, dec_store, dec_udi_valid, flush;
  logic [2:0] xfer;
  logic       wb_ok, load_valid, vpu_done, result_ready;
  logic       new_instr, vpu_start, vpu_abort, rs1rd, rd_mode, write_enable, result_consume;
  logic       done, sleep_not_ready;
  fcm_mode_e  mode;

  fcm_control dut (
    .clk(clk), .rst(rst), .instr_valid(instr_valid), .dec_load(dec_load),
    .dec_store(dec_store), .dec_udi_valid(dec_udi_valid), .flush(flush),
    .ldst_xfer_size(xfer), .writeback_ok(wb_ok), .load_valid(load_valid),
    .vpu_done(vpu_done), .result_ready(result_ready), .new_instr(new_instr),
    .mode(mode), .vpu_start(vpu_start), .vpu_abort(vpu_abort), .rs1rd(rs1rd),
    .rd_mode(rd_mode), .write_enable(write_enable), .result_consume(result_consume),
    .done(done), .sleep_not_ready(sleep_not_ready));

  bit last_was_udi_done;   // previous cycle completed a UDI

  // kind: 0 UDI, 1 LOAD, 2 STORE. Event cycles are relative to the issue
  // cycle. Returns after done (or after the flush).
  task automatic issue(input int kind, input int lat, input int wb, input bit wb_pulse,
                       input int evt, input int flush_at);
    int  exp_done, c, starts, vstart;
    bit  got_done, first;
    first = !last_was_udi_done;
    case (kind)
      0: exp_done = (lat > wb) ? lat : wb;
      1: exp_done = evt;
      default: exp_done = evt;
    endcase
    if (kind == 0 && first && exp_done < 1) exp_done = 1;
    if (flush_at >= 0 && flush_at <= exp_done) exp_done = -1;
    c = 0; starts = 0; vstart = -1; got_done = 0;
    result_ready = 1'b0;
    while (1) begin
      instr_valid   = (c == 0);
      dec_udi_valid = (c == 0) && kind == 0;
      dec_load      = (c == 0) && kind == 1;
      dec_store     = (c == 0) && kind == 2;
      flush         = (c == flush_at);
      wb_ok         = wb_pulse ? (c == wb) : (c >= wb);
      load_valid    = (kind == 1) && (c == evt);
      xfer          = (kind == 2 && c >= evt) ? 3'b100 : 3'b000;
      #1;
      if (vpu_start) begin starts++; vstart = c; end
      vpu_done = (vstart >= 0) && (c == vstart + lat);
      #1;
      checks++;
      if (done != (c == exp_done)) begin
        failures++;
        $display("FAIL kind %0d lat %0d wb %0d/%0d evt %0d flush %0d: done=%0d at cycle %0d (exp %0d)",
                 kind, lat, wb, wb_pulse, evt, flush_at, done, c, exp_done);
      end
      checks++;
      if (write_enable != (done && kind != 2)) begin failures++; $display("FAIL write_enable"); end
      if (kind == 1 && !flush) begin checks++; if (!rd_mode) begin failures++; $display("FAIL rd_mode"); end end
      if (kind == 2 && !flush) begin checks++; if (!rs1rd) begin failures++; $display("FAIL rs1rd"); end end
      if (flush) begin checks++; if (!vpu_abort) begin failures++; $display("FAIL abort"); end end
      if (done) got_done = 1;
      last_was_udi_done = done && kind == 0;
      @(posedge clk);
      // result-hold model
      if (flush || result_consume) result_ready <= 1'b0;
      else if (vpu_done) result_ready <= 1'b1;
      @(negedge clk);
      if (got_done || c == flush_at || c > 40) break;
      c++;
    end
    instr_valid = 0; dec_udi_valid = 0; dec_load = 0; dec_store = 0; flush = 0;
    wb_ok = 0; load_valid = 0; xfer = 0; vpu_done = 0;
    if (kind == 0 && flush_at < 0) begin
      checks++;
      if (starts != 1) begin failures++; $display("FAIL %0d vpu_start pulses", starts); end
    end
    if (exp_done < 0) n_flush++;
    else if (kind == 0) begin
      if (exp_done == 0) n_same++;
      if (first && lat == 0 && wb <= 0) n_first++;
      if (wb_pulse && wb < lat) n_wbhold++;
      if (lat > 1) n_long++;
    end else if (kind == 2 && evt > 0) n_stdelay++;
  endtask

  initial begin
    rst = 1'b1;
    instr_valid = 0; dec_udi_valid = 0; dec_load = 0; dec_store = 0; flush = 0;
    wb_ok = 0; load_valid = 0; xfer = 0; vpu_done = 0; result_ready = 0;
    last_was_udi_done = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Directed: a run of single-cycle UDIs, the first taking two cycles.
    issue(0, 0, 0, 0, 0, -1);
    issue(0, 0, 0, 0, 0, -1);
    issue(0, 0, 0, 0, 0, -1);
    // Square root sized latency with a one-cycle writeback pulse up front.
    issue(0, 13, 0, 1, 0, -1);
    // Store with late transfer size, load.
    issue(2, 0, 0, 0, 3, -1);
    issue(1, 0, 0, 0, 2, -1);
    // Random stream.
    for (int i = 0; i < 3000; i++) begin
      int kind, lat, wb, evt, fl;
      bit pulse;
      kind  = $urandom_range(2);
      lat   = ($urandom_range(3) == 0) ? $urandom_range(13) : 0;
      wb    = $urandom_range(3);
      pulse = 1'($urandom);
      if (pulse) wb = $urandom_range(lat);
      evt   = $urandom_range(4);
      fl    = ($urandom_range(15) == 0) ? $urandom_range(4) : -1;
      issue(kind, lat, wb, pulse, evt, fl);
      if ($urandom_range(3) == 0) begin
        last_was_udi_done = 0;
        repeat ($urandom_range(3) + 1) @(negedge clk);
      end
    end
    checks++;
    if (n_same == 0 || n_first == 0 || n_wbhold == 0 || n_stdelay == 0 || n_flush == 0 || n_long == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("same-cycle %0d first-two-cycle %0d writeback-held %0d store-delayed %0d flush %0d long %0d",
             n_same, n_first, n_wbhold, n_stdelay, n_flush, n_long);
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
