// cla_block_c: four-input look-ahead cell ("C" block) of the carry-look-ahead adder.
//
// It combines four (generate, propagate) pairs of equal-sized sub-groups into
// one group pair and, given the carry into the group, returns the carry into
// each of the four sub-groups, all in two-level logic.  Stacking it as a
// radix-4 tree gives the 4, 16, 64 and 256-bit adders.  Purely combinational.
module cla_block_c (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       c_in,
  output logic       g_grp,
  output logic       p_grp,
  output logic [3:0] c      // carry into sub-group 0..3
);
  // Separate continuous assignments: the upward (G, P) and downward (carry)
  // paths must not share one process, or the tree would look like a loop.
  assign c[0]  = c_in;
  assign c[1]  = g[0] | (p[0] & c_in);
  assign c[2]  = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c_in);
  assign c[3]  = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c_in);
  assign g_grp = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  assign p_grp = &p;
endmodule
