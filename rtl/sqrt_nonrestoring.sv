// sqrt_nonrestoring: iterative nonrestoring integer square root.
//
// Computes the W/2-bit square root of a W-bit radicand and its remainder,
// one root bit per clock. Three registers carry the state: D holds the
// radicand and shifts two bits left per step, Q collects the root and
// shifts one bit left, R holds the signed partial remainder. A single
// (W/2+2)-bit adder/subtractor forms R' = 4R + (next two radicand bits)
// minus (4Q + 1) when R is non-negative, or plus (4Q + 3) when R is
// negative; the inverted sign of R' is the next root bit.
//
// Timing: start is sampled on a rising edge together with the radicand, and
// that edge already performs the first step. done is high in the cycle W/2
// clocks after the start cycle, i.e. 13 cycles for the 26-bit radicand the
// floating-point square root uses and 16 for the 32-bit default. root and
// remainder stay valid until the next start; the cancel input returns the
// unit to idle.
//
// The register and adder structure (32-bit radicand, D shifted two bits and
// Q one bit per step, 18-bit add/sub whose mode comes from the remainder
// sign, 16-bit root) follows the published data path. The final remainder
// correction and the start/done handshake are this design's own.
module sqrt_nonrestoring #(
  parameter int unsigned W = 32                 // radicand bits, even
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             cancel,
  input  logic [W-1:0]     radicand,
  output logic             busy,
  output logic             done,
  output logic [W/2-1:0]   root,
  output logic [W/2:0]     remainder            // radicand - root*root
);

  localparam int unsigned H  = W / 2;           // root bits = iterations
  localparam int unsigned AW = H + 2;           // adder width

  logic [W-1:0]  d_q;
  logic [H-1:0]  q_q;
  logic [AW-1:0] r_q;
  logic [$clog2(H+1)-1:0] cnt_q;

  // One step of the recurrence, from either the new radicand (start) or
  // the registers.
  logic [W-1:0]  d_in;
  logic [H-1:0]  q_in;
  logic [AW-1:0] r_in, a_op, b_op, r_nxt;
  logic          sub;

  always_comb begin
    d_in  = start ? radicand : d_q;
    q_in  = start ? '0 : q_q;
    r_in  = start ? '0 : r_q;
    sub   = ~r_in[AW-1];
    a_op  = {r_in[AW-3:0], d_in[W-1:W-2]};
    b_op  = {q_in, ~sub, 1'b1};                // 4Q+1 or 4Q+3
    r_nxt = sub ? a_op - b_op : a_op + b_op;
  end

  always_ff @(posedge clk) begin
    if (rst || cancel) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt_q <= '0;
      d_q   <= '0;
      q_q   <= '0;
      r_q   <= '0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        d_q   <= {d_in[W-3:0], 2'b00};
        q_q   <= {q_in[H-2:0], ~r_nxt[AW-1]};
        r_q   <= r_nxt;
        cnt_q <= start ? ($bits(cnt_q))'(1) : cnt_q + 1'b1;
        if ((start ? 1 : int'(cnt_q) + 1) == H) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          busy <= 1'b1;
        end
      end
    end
  end

  // Final remainder correction: a negative remainder gets 2Q+1 added back.
  logic [AW-1:0] r_fix;
  always_comb begin
    r_fix = r_q[AW-1] ? r_q + {1'b0, q_q, 1'b1} : r_q;
  end

  assign root      = q_q;
  assign remainder = r_fix[H:0];

endmodule
