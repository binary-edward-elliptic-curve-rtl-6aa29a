// mult_r4_precomp: precomputation stage of the radix-4 modular multiplier.
//
// On start it registers the multiplicand A (Reg1).  From that register it
// offers the three non-zero radix-4 multiples at 258 bits: A, 2A (a wired left
// shift) and 3A = A + 2A from one carry-look-ahead adder (S1).  The outputs are
// combinational from Reg1 and are valid from the cycle after start; the
// multiplier spends that cycle capturing them, so the S1 adder stays out of the
// multiplier's iteration loop.  Structure as in the design's precomputation
// block; the synchronous active-high reset is this implementation's choice.
module mult_r4_precomp
  import ecc_pkg::*;
(
  input  logic            clock,
  input  logic            reset,
  input  logic            start,
  input  fe_t             a,
  output logic [NMUL-1:0] a1,
  output logic [NMUL-1:0] a2,
  output logic [NMUL-1:0] a3
);
  fe_t reg1;

  always_ff @(posedge clock) begin
    if (reset)      reg1 <= '0;
    else if (start) reg1 <= a;
  end

  assign a1 = {2'b00, reg1};
  assign a2 = {1'b0, reg1, 1'b0};

  cla_adder #(.WIDTH(NMUL)) u_s1 (
    .a(a1), .b(a2), .cin(1'b0), .sum(a3), .cout()
  );
endmodule
