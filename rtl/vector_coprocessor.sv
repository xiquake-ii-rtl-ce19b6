// vector_coprocessor: 4-wide single-precision vector coprocessor attached to
// a PowerPC 440 through the Fabric Co-processor Bus (FCB).
//
// The processor decodes VMX-style 128-bit vector loads and stores and
// user-defined instructions (UDIs) and hands them to this module. The
// module keeps 32 vector registers of 128 bits (four single-precision
// elements each) and executes autonomous instructions only: nothing is ever
// returned to the processor's own registers, so the result, condition and
// exception outputs are constant.
//
//   load   APUFCMLOADDATA is written to register rd when APUFCMLOADVALID.
//   store  register rd is driven on FCMAPUSTOREDATA straight from the
//          asynchronous register-file read port.
//   UDI    T(rd) = op(A(rs1), B(rs2)) on the vector unit (see vpu).
//
// Data path: instruction register and decoder -> register file (rs1 port
// address muxed between rs1 and rd) -> vector unit -> result hold ->
// write-data mux (vector result or load data) -> register file. The
// controller (fcm_control) produces FCMAPUDONE. Timing: a UDI that follows
// a completed UDI completes in its own arrival cycle; the first of a
// sequence takes two; SQRT takes 13 cycles in the vector unit; stores
// complete as soon as the transfer size is non-zero; loads when the data is
// valid. One instruction can complete every cycle.
//
// FCB signals that this design does not need (non-autonomous decode, FPU
// decode, endian, MSR bits, operand and register A/B data, next-instruction
// ready) are accepted and not used, as in the original design; the UDI
// number on APUFCMDECUDI is not used either because the operation comes
// from the extended-opcode field. Signal names and the constant outputs
// follow the original block diagram; FCMAPURESULTVALID is held low because
// no instruction returns a result, which is this design's reading.
module vector_coprocessor
  import vpu_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  // FCB inputs
  input  logic          APUFCMINSTRVALID,
  input  logic [0:31]   APUFCMINSTRUCTION,
  input  logic          APUFCMDECLOAD,
  input  logic          APUFCMDECSTORE,
  input  logic [0:3]    APUFCMDECUDI,
  input  logic          APUFCMDECUDIVALID,
  input  logic          APUFCMFLUSH,
  input  logic [0:2]    APUFCMDECLDSTXFERSIZE,
  input  logic          APUFCMWRITEBACKOK,
  input  logic          APUFCMDECNONAUTON,
  input  logic          APUFCMDECFPUOP,
  input  logic          APUFCMENDIAN,
  input  logic          APUFCMMSRFE0,
  input  logic          APUFCMMSRFE1,
  input  logic          APUFCMNEXTINSTRREADY,
  input  logic          APUFCMOPERANDVALID,
  input  logic [0:31]   APUFCMRADATA,
  input  logic [0:31]   APUFCMRBDATA,
  input  logic [0:127]  APUFCMLOADDATA,
  input  logic          APUFCMLOADVALID,
  // FCB outputs
  output logic          FCMAPUDONE,
  output logic          FCMAPURESULTVALID,
  output logic          FCMAPUSLEEPNOTREADY,
  output logic          FCMAPUCONFIRMINSTR,
  output logic [0:3]    FCMAPUCR,
  output logic          FCMAPUEXCEPTION,
  output logic          FCMAPUFPSCRFEX,
  output logic [0:31]   FCMAPURESULT,
  output logic [0:127]  FCMAPUSTOREDATA
);

  logic        new_instr, vpu_start, vpu_abort, rs1rd, rd_mode;
  logic        write_enable, result_consume, result_ready, vpu_done, vpu_busy;
  fcm_mode_e   mode;
  logic [0:31] instr;
  vreg_addr_t  rd, rs1, rs2, raddr1;
  vpu_op_e     op;
  vec_t        s1, s2, vpu_result, held_result, wdata;

  fcm_control u_control (
    .clk             (clk),
    .rst             (rst),
    .instr_valid     (APUFCMINSTRVALID),
    .dec_load        (APUFCMDECLOAD),
    .dec_store       (APUFCMDECSTORE),
    .dec_udi_valid   (APUFCMDECUDIVALID),
    .flush           (APUFCMFLUSH),
    .ldst_xfer_size  (APUFCMDECLDSTXFERSIZE),
    .writeback_ok    (APUFCMWRITEBACKOK),
    .load_valid      (APUFCMLOADVALID),
    .vpu_done        (vpu_done),
    .result_ready    (result_ready),
    .new_instr       (new_instr),
    .mode            (mode),
    .vpu_start       (vpu_start),
    .vpu_abort       (vpu_abort),
    .rs1rd           (rs1rd),
    .rd_mode         (rd_mode),
    .write_enable    (write_enable),
    .result_consume  (result_consume),
    .done            (FCMAPUDONE),
    .sleep_not_ready (FCMAPUSLEEPNOTREADY)
  );

  instr_decode u_decode (
    .clk      (clk),
    .rst      (rst),
    .load     (new_instr),
    .instr_in (APUFCMINSTRUCTION),
    .instr    (instr),
    .rd       (rd),
    .rs1      (rs1),
    .rs2      (rs2),
    .op       (op)
  );

  assign raddr1 = rs1rd ? rd : rs1;
  assign wdata  = rd_mode ? vec_t'(APUFCMLOADDATA) : held_result;

  vreg_file u_regs (
    .clk    (clk),
    .we     (write_enable),
    .waddr  (rd),
    .wdata  (wdata),
    .raddr1 (raddr1),
    .rdata1 (s1),
    .raddr2 (rs2),
    .rdata2 (s2)
  );

  vpu u_vpu (
    .clk    (clk),
    .rst    (rst),
    .op     (op),
    .start  (vpu_start),
    .cancel (vpu_abort),
    .d1     (s1),
    .d2     (s2),
    .result (vpu_result),
    .done   (vpu_done),
    .busy   (vpu_busy)
  );

  result_hold u_hold (
    .clk        (clk),
    .rst        (rst),
    .flush      (vpu_abort),
    .vpu_done   (vpu_done),
    .vpu_result (vpu_result),
    .consume    (result_consume),
    .result     (held_result),
    .ready      (result_ready)
  );

  assign FCMAPUSTOREDATA    = s1;
  assign FCMAPURESULTVALID  = 1'b0;
  assign FCMAPUCONFIRMINSTR = 1'b0;
  assign FCMAPUCR           = 4'b0000;
  assign FCMAPUEXCEPTION    = 1'b0;
  assign FCMAPUFPSCRFEX     = 1'b0;
  assign FCMAPURESULT       = 32'h0000_0000;

endmodule
