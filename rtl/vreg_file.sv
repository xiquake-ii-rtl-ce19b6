// vreg_file: vector register file, 32 registers of 128 bits.
//
// Two read ports and one write port. Reads are asynchronous: the data of
// the addressed register appears in the same cycle, which is what lets the
// coprocessor answer a store or a single-cycle operation in the cycle the
// instruction arrives (a block RAM with registered reads could not). The
// write port writes wdata to register waddr on the rising clock edge when
// we is set; a read of the register being written returns the old value
// until that edge. The array has no reset, like the distributed RAM it
// models.
//
// Size (32 x 128 bits = 4 Kbit of storage) and asynchronous reads follow the
// original design.
module vreg_file
  import vpu_pkg::*;
#(
  parameter int unsigned NREGS = NUM_VREGS,
  parameter int unsigned WIDTH = VLEN
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  output logic [WIDTH-1:0]         rdata1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  output logic [WIDTH-1:0]         rdata2
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we) regs[waddr] <= wdata;
  end

  assign rdata1 = regs[raddr1];
  assign rdata2 = regs[raddr2];

endmodule
