// fcm_control: control of the fabric co-processor module.
//
// Tracks the one instruction in flight and decides, cycle by cycle, when it
// completes. Two registers remember the previous cycle: the mode register
// (what kind of instruction was in flight: idle, UDI, load or store) and
// the done register (whether it completed). The current mode is the decoded
// kind of a newly arriving instruction, idle after a completion or a
// flush, and otherwise the remembered mode.
//
//   UDI    the vector unit is started once (vpu_start). The instruction
//          completes when a result is available (live from the unit or in
//          the result-hold register) and writeback is allowed; the result
//          is then written to rd. A UDI may complete in its arrival cycle
//          only if a UDI completed in the cycle before; the first UDI of a
//          sequence therefore takes at least two cycles.
//   LOAD   completes in the cycle the load data is valid; the data is
//          written to rd (rd_mode selects load data for the write port).
//   STORE  the register named by the rd field is read on the first read
//          port (rs1rd) and driven as store data; the store completes once
//          the transfer size is non-zero, which may be later than the
//          instruction itself.
//
// Writeback permission may come before the result; the write-OK hold
// register keeps it until the instruction completes. A flush abandons the
// instruction in flight: nothing is written and no done is given.
// done is combinational, in the cycle the instruction completes.
//
// Following the original design: autonomous instructions only, same-cycle
// completion wherever possible, the two-cycle first UDI, waiting for a
// non-zero transfer size on stores, and the block structure (mode and done
// registers, write-OK hold, result hold, rs1/rd and write-data muxes). The
// exact rules for loads (no wait for writeback permission), the order of
// priority among the decode strobes and the busy indication
// (sleep_not_ready) are this design's choices.
module fcm_control
  import vpu_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  // from the processor
  input  logic      instr_valid,
  input  logic      dec_load,
  input  logic      dec_store,
  input  logic      dec_udi_valid,
  input  logic      flush,
  input  logic [2:0] ldst_xfer_size,
  input  logic      writeback_ok,
  input  logic      load_valid,
  // from the data path
  input  logic      vpu_done,
  input  logic      result_ready,
  // to the data path
  output logic      new_instr,
  output fcm_mode_e mode,
  output logic      vpu_start,
  output logic      vpu_abort,
  output logic      rs1rd,
  output logic      rd_mode,
  output logic      write_enable,
  output logic      result_consume,
  // to the processor
  output logic      done,
  output logic      sleep_not_ready
);

  fcm_mode_e mode_prev;     // Mode REG
  logic      done_prev;     // Done REG
  logic      wok_q;         // WriteOK Hold
  logic      issued_q;      // vector unit started for this UDI

  fcm_mode_e decoded, inflight;
  logic      write_ok, issued, same_cycle_ok;
  logic      done_udi, done_load, done_store;

  always_comb begin
    if (dec_udi_valid)  decoded = MODE_UDI;
    else if (dec_load)  decoded = MODE_LOAD;
    else if (dec_store) decoded = MODE_STORE;
    else                decoded = MODE_IDLE;

    inflight  = done_prev ? MODE_IDLE : mode_prev;
    new_instr = instr_valid && !flush;
    if (flush)          mode = MODE_IDLE;
    else if (new_instr) mode = decoded;
    else                mode = inflight;

    write_ok      = writeback_ok || (wok_q && !new_instr);
    issued        = issued_q && !new_instr;
    same_cycle_ok = done_prev && (mode_prev == MODE_UDI);

    vpu_start  = (mode == MODE_UDI) && !issued;
    vpu_abort  = flush;
    done_udi   = (mode == MODE_UDI) && (vpu_done || result_ready) && write_ok
                 && (!new_instr || same_cycle_ok);
    done_load  = (mode == MODE_LOAD) && load_valid;
    done_store = (mode == MODE_STORE) && (ldst_xfer_size != 3'd0);
    done       = done_udi || done_load || done_store;

    write_enable    = done_udi || done_load;
    result_consume  = done_udi;
    rd_mode         = (mode == MODE_LOAD);
    rs1rd           = (mode == MODE_STORE);
    sleep_not_ready = (mode != MODE_IDLE) && !done;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mode_prev <= MODE_IDLE;
      done_prev <= 1'b0;
      wok_q     <= 1'b0;
      issued_q  <= 1'b0;
    end else begin
      mode_prev <= mode;
      done_prev <= done;
      wok_q     <= (mode != MODE_IDLE) && !done && write_ok;
      issued_q  <= (mode == MODE_UDI) && !done && (issued || vpu_start);
    end
  end

  // The processor issues one instruction at a time to this unit: a new
  // instruction never arrives while another is still in flight.
  a_one_in_flight: assert property (@(posedge clk) disable iff (rst)
    instr_valid |-> (inflight == MODE_IDLE))
    else $error("instruction issued while another is in flight");

  // At most one of the decode strobes accompanies an instruction.
  a_one_kind: assert property (@(posedge clk) disable iff (rst)
    instr_valid |-> $onehot0({dec_load, dec_store, dec_udi_valid}))
    else $error("more than one decode strobe");

endmodule
