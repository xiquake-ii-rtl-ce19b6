// result_hold: holding register between the vector unit and the register
// file write port.
//
// When the vector unit reports a result (vpu_done) that the controller does
// not write back in the same cycle (consume low), for instance because the
// processor has not yet allowed writeback or because the first operation
// of a sequence must take two cycles, the result is captured here and
// ready goes high. While ready is high the held value is presented on
// result; otherwise the unit's live result passes through, so a result that
// is written at once costs no cycle. consume (the write-back) or flush
// empties the register.
//
// The block and its position in the data path follow the original design;
// its exact capture and release rules are this design's.
module result_hold
  import vpu_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic flush,
  input  logic vpu_done,
  input  vec_t vpu_result,
  input  logic consume,
  output vec_t result,
  output logic ready
);

  vec_t held_q;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      ready  <= 1'b0;
      held_q <= '0;
    end else if (consume) begin
      ready  <= 1'b0;
    end else if (vpu_done && !ready) begin
      ready  <= 1'b1;
      held_q <= vpu_result;
    end
  end

  assign result = ready ? held_q : vpu_result;

endmodule
