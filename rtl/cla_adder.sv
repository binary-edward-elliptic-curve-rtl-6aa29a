// cla_adder: hierarchical carry-look-ahead adder, the elementary adder of the core.
//
// sum = a + b + cin, cout = carry out of bit WIDTH-1.  The adder is a radix-4
// tree: each bit is an A cell (generate/propagate/sum), four bits form a 4-bit
// CLA under a C cell, four of those a 16-bit CLA and so on up to the largest
// power of four that fits in WIDTH (256 for the widths used in the core).  The
// tree is walked twice: generate/propagate travel up to the root, carries
// travel back down.  Bits above the power-of-four core (bit 256 of the 257-bit
// adder, bits 256..257 of the 258-bit adder) are attached on the left with B
// cells, each merging one more bit with the group below it.
// Purely combinational; WIDTH must be at least 4.
module cla_adder #(
  parameter int unsigned WIDTH = 256
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  function automatic int unsigned levels_for(int unsigned w);
    int unsigned l = 0;
    while ((4 ** (l + 1)) <= w) l++;
    return l;
  endfunction

  localparam int unsigned LEVELS = levels_for(WIDTH);
  localparam int unsigned CORE   = 4 ** LEVELS;
  localparam int unsigned EXTRA  = WIDTH - CORE;

  logic [WIDTH-1:0] g_bit, p_bit, c_bit;
  logic             g_all, p_all, c_core;

  cla_block_a #(.W(WIDTH)) u_cells (
    .a(a), .b(b), .c(c_bit), .g(g_bit), .p(p_bit), .s(sum)
  );

  // radix-4 look-ahead tree over the CORE low bits; lv[l] holds CORE/4^l nodes
  for (genvar l = 0; l <= LEVELS; l++) begin : lv
    logic [(CORE >> (2*l))-1:0] g, p, c;
    if (l == 0) begin : g_leaf
      assign g = g_bit[CORE-1:0];
      assign p = p_bit[CORE-1:0];
      assign c_bit[CORE-1:0] = c;
    end else begin : g_node
      for (genvar i = 0; i < (CORE >> (2*l)); i++) begin : node
        cla_block_c u_c (
          .g    (lv[l-1].g[4*i +: 4]),
          .p    (lv[l-1].p[4*i +: 4]),
          .c_in (c[i]),
          .g_grp(g[i]),
          .p_grp(p[i]),
          .c    (lv[l-1].c[4*i +: 4])
        );
      end
    end
  end
  assign lv[LEVELS].c[0] = c_core;

  if (EXTRA == 0) begin : g_no_ext
    assign c_core = cin;
    assign g_all  = lv[LEVELS].g[0];
    assign p_all  = lv[LEVELS].p[0];
  end else begin : g_ext
    // ext[j] is the group of bits WIDTH-1 .. CORE+j; c is the carry into it
    for (genvar j = 0; j < EXTRA; j++) begin : ext
      logic g, p, c;
      if (j == EXTRA - 1) begin : g_top
        assign g = g_bit[CORE+j];
        assign p = p_bit[CORE+j];
        assign c_bit[CORE+j] = c;
      end else begin : g_merge
        cla_block_b u_b (
          .g_hi(ext[j+1].g), .p_hi(ext[j+1].p),
          .g_lo(g_bit[CORE+j]), .p_lo(p_bit[CORE+j]),
          .c_in(c),
          .g_grp(g), .p_grp(p),
          .c_hi(ext[j+1].c), .c_lo(c_bit[CORE+j])
        );
      end
    end
    cla_block_b u_b_root (
      .g_hi(ext[0].g), .p_hi(ext[0].p),
      .g_lo(lv[LEVELS].g[0]), .p_lo(lv[LEVELS].p[0]),
      .c_in(cin),
      .g_grp(g_all), .p_grp(p_all),
      .c_hi(ext[0].c), .c_lo(c_core)
    );
  end

  assign cout = g_all | (p_all & cin);
endmodule
