// instr_decode: instruction register and field decoder.
//
// The 32-bit instruction word arrives from the processor with the
// instruction-valid strobe (load). It is captured in the instruction
// register so that its fields stay available while the instruction is in
// flight; in the arrival cycle itself the word on the bus is decoded
// directly, so single-cycle operations need no extra cycle.
//
// Fields (PowerPC bit numbering, bit 0 is the most significant):
//   [6:10]  rd   target register, or source register of a store
//   [11:15] rs1  first source (A)
//   [16:20] rs2  second source (B)
//   [21:25] op   5-bit extended opcode (vpu_op_e)
// The register fields use the standard PowerPC positions; placing the
// extended opcode in bits [21:25] is this design's choice.
module instr_decode
  import vpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [0:31] instr_in,
  output logic [0:31] instr,
  output vreg_addr_t  rd,
  output vreg_addr_t  rs1,
  output vreg_addr_t  rs2,
  output vpu_op_e     op
);

  logic [0:31] instr_q;

  always_ff @(posedge clk) begin
    if (rst)       instr_q <= '0;
    else if (load) instr_q <= instr_in;
  end

  assign instr = load ? instr_in : instr_q;
  assign rd    = instr[6:10];
  assign rs1   = instr[11:15];
  assign rs2   = instr[16:20];
  assign op    = vpu_op_e'(instr[21:25]);

endmodule
