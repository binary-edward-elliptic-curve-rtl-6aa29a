// mod_sub: modular subtractor, out = (a - b) mod p over GF(2^255 - 19).
//
// A start pulse loads a and b.  In the next cycle a 257-bit carry-look-ahead
// adder forms S1 = a - b (as a + ~b + 1); its MSB is the sign.  A second adder
// forms S2 = S1 + p, and the sign selects S2 when S1 is negative and S1
// otherwise.  The result is registered and done pulses for one cycle with it,
// two clock edges after the edge that samples start, exactly as in mod_add.
// The datapath follows the modular subtractor of the design; register
// placement and the synchronous active-high reset are this implementation's
// choice.  Both operands must already be reduced (below p).
module mod_sub
  import ecc_pkg::*;
(
  input  logic clock,
  input  logic reset,
  input  logic start,
  input  fe_t  a,
  input  fe_t  b,
  output fe_t  out,
  output logic done
);
  fe_t             ra, rb;
  logic            busy;
  logic [NADD-1:0] s1, s2;

  cla_adder #(.WIDTH(NADD)) u_s1 (
    .a({1'b0, ra}), .b(~{1'b0, rb}), .cin(1'b1), .sum(s1), .cout()
  );
  cla_adder #(.WIDTH(NADD)) u_s2 (
    .a(s1), .b({1'b0, P_MOD}), .cin(1'b0), .sum(s2), .cout()
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      busy <= 1'b0;
      done <= 1'b0;
      out  <= '0;
      ra   <= '0;
      rb   <= '0;
    end else begin
      busy <= start;
      done <= busy;
      if (start) begin
        ra <= a;
        rb <= b;
      end
      if (busy) out <= s1[NADD-1] ? s2[N-1:0] : s1[N-1:0];
    end
  end
endmodule
