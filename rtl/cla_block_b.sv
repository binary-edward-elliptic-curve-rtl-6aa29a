// cla_block_b: two-input look-ahead cell ("B" block) of the carry-look-ahead adder.
//
// It merges an upper (g_hi, p_hi) pair with the lower pair (g_lo, p_lo) into a
// group generate G = g_hi | g_lo&p_hi and propagate P = p_hi&p_lo, and on the way
// back passes the incoming carry c_in down to the lower part and forms the
// carry into the upper part, c_hi = g_lo | p_lo&c_in.  The core uses it to widen
// the 256-bit tree by one bit at a time on the most significant side.
// Purely combinational.
module cla_block_b (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  input  logic c_in,
  output logic g_grp,
  output logic p_grp,
  output logic c_hi,
  output logic c_lo
);
  // Separate continuous assignments: the upward (G, P) and downward (carry)
  // paths must not share one process, or the tree would look like a loop.
  assign g_grp = g_hi | (g_lo & p_hi);
  assign p_grp = p_hi & p_lo;
  assign c_lo  = c_in;
  assign c_hi  = g_lo | (p_lo & c_in);
endmodule
