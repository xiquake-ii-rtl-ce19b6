// vpu_pkg: types and constants shared by the vector coprocessor.
//
// A vector register is 128 bits holding four IEEE-754 single-precision
// values. Bit numbering follows the PowerPC convention used on the
// coprocessor bus: element 0 occupies bits [0:31] (the most significant
// word), element 3 bits [96:127].
//
// The operation codes are the 5-bit extended opcode carried in the UDI
// instruction word. The ten operations are the ones the coprocessor is
// specified to support; their numeric encoding is this design's choice.
package vpu_pkg;

  localparam int unsigned NUM_VREGS  = 32;   // vector registers
  localparam int unsigned VLEN       = 128;  // bits per vector register
  localparam int unsigned NUM_LANES  = 4;    // single-precision lanes
  localparam int unsigned SQRT_WIDTH = 26;   // radicand bits of the FP square root (13 root bits)

  typedef logic [31:0]       fp32_t;
  typedef fp32_t [0:3]       vec_t;          // element 0 is the leftmost word
  typedef logic [4:0]        vreg_addr_t;

  // Extended opcode of a UDI (instruction bits [21:25]).
  typedef enum logic [4:0] {
    OP_ADD  = 5'd0,   // T = A + B
    OP_SUB  = 5'd1,   // T = A - B
    OP_MUL  = 5'd2,   // T = A * B
    OP_DIV  = 5'd3,   // T = A / B
    OP_MOV  = 5'd4,   // T = A
    OP_INV  = 5'd5,   // T = 1 / A
    OP_SQRT = 5'd6,   // T = sqrt(A)
    OP_SUM  = 5'd7,   // T = [a0+a1+a2+a3, b0, b1, b2]
    OP_ITOF = 5'd8,   // T = float(A)
    OP_FTOI = 5'd9    // T = int(A), truncated toward zero
  } vpu_op_e;

  // Operation of one floating-point lane.
  typedef enum logic [2:0] {
    LANE_ADD  = 3'd0,
    LANE_SUB  = 3'd1,
    LANE_MUL  = 3'd2,
    LANE_DIV  = 3'd3,
    LANE_ITOF = 3'd4,
    LANE_FTOI = 3'd5
  } lane_op_e;

  // What the instruction in flight is (Mode REG).
  typedef enum logic [2:0] {
    MODE_IDLE  = 3'd0,
    MODE_UDI   = 3'd1,
    MODE_LOAD  = 3'd2,
    MODE_STORE = 3'd3
  } fcm_mode_e;

  localparam fp32_t FP_ONE    = 32'h3F80_0000;
  localparam fp32_t FP_QNAN   = 32'h7FC0_0000;

endpackage
