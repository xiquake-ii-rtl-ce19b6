// nr_array_divider: combinational nonrestoring array divider.
//
// Unsigned division of a (N+Q-1)-bit dividend Z by an N-bit divisor D,
// giving a Q-bit quotient and the partial remainder of the last row.
// The array has Q rows of N+2 controlled add/subtract (CAS) cells. A CAS
// cell XORs its divisor bit with the row's control line and feeds the
// result to a full adder; the control line is also the row's carry-in, so
// a row subtracts D when the control is 1 and adds D when it is 0. The
// first row always subtracts. Each row's sign (the inverted top sum bit)
// is that row's quotient bit and becomes the control of the next row.
//
// Precondition: Z < D * 2**Q, so that the quotient fits in Q bits.
// The remainder output is the uncorrected last partial remainder, a signed
// N+2-bit value; when it is negative the true remainder is rem + D.
//
// The cell structure (XOR plus full adder, control ripple from row to row,
// constant 1 into the first row) follows the classic array divider. The
// integer framing of the operands and the widths are this design's choice;
// the floating-point divider uses N=24, Q=26 for the significands.
module nr_array_divider #(
  parameter int unsigned N = 4,   // divisor bits
  parameter int unsigned Q = 4    // quotient bits (number of rows)
) (
  input  logic [N+Q-2:0]  z,      // dividend
  input  logic [N-1:0]    d,      // divisor
  output logic [Q-1:0]    q,      // quotient
  output logic [N+1:0]    rem     // last partial remainder (signed, uncorrected)
);

  localparam int unsigned W = N + 2;   // cells per row

  // Partial remainders entering each row (before the shift-in of the next
  // dividend bit) and the control line of each row.
  logic [W-1:0] r   [0:Q];
  logic         ctl [0:Q];
  logic [W-1:0] dext;

  assign dext   = W'(d);
  // Top N-1 dividend bits form the initial partial remainder.
  assign r[0]   = W'(z[N+Q-2:Q]);
  assign ctl[0] = 1'b1;                // first row subtracts

  for (genvar i = 0; i < Q; i++) begin : g_row
    logic [W-1:0] a;                   // shifted remainder with next dividend bit
    logic [W-1:0] b;                   // divisor bits after the control XOR
    logic [W:0]   c;                   // carry chain
    logic [W-1:0] s;

    assign a    = {r[i][W-2:0], z[Q-1-i]};
    assign c[0] = ctl[i];
    for (genvar j = 0; j < W; j++) begin : g_cell
      assign b[j]   = dext[j] ^ ctl[i];
      assign s[j]   = a[j] ^ b[j] ^ c[j];
      assign c[j+1] = (a[j] & b[j]) | (a[j] & c[j]) | (b[j] & c[j]);
    end
    assign r[i+1]   = s;
    assign q[Q-1-i] = ~s[W-1];         // non-negative remainder -> quotient bit 1
    assign ctl[i+1] = ~s[W-1];         // then subtract in the next row, else add
  end

  assign rem = r[Q];

endmodule
