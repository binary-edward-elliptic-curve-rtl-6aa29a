// mod_addsub: combined modular adder/subtractor over GF(2^255 - 19).
//
// out = (a + b) mod p when as = 0 and (a - b) mod p when as = 1.  It shares two
// 257-bit carry-look-ahead adders between both operations:
//   mux1: the second operand of S1 is b (add) or ~b with carry-in 1 (subtract);
//   mux2: the second operand of S2 is ~p with carry-in 1 (add: S1 - p) or p
//         (subtract: S1 + p);
//   mux3: subtract result, S2 if S1 is negative else S1;
//   mux4: add result, S1 if S2 is negative else S2;
//   mux5: as picks the mux3 or mux4 result.
// Timing is that of mod_add: start loads a, b and as; done pulses two clock
// edges later with the registered result.  The multiplexer structure follows
// the design; register placement and the synchronous active-high reset are this
// implementation's choice.  Both operands must already be reduced (below p).
module mod_addsub
  import ecc_pkg::*;
(
  input  logic clock,
  input  logic reset,
  input  logic start,
  input  logic as,      // 1: subtract, 0: add
  input  fe_t  a,
  input  fe_t  b,
  output fe_t  out,
  output logic done
);
  fe_t             ra, rb;
  logic            ras;
  logic            busy;
  logic [NADD-1:0] op_b, op_p, s1, s2;
  fe_t             res_sub, res_add;

  always_comb begin
    op_b    = ras ? ~{1'b0, rb} : {1'b0, rb};            // mux1
    op_p    = ras ? {1'b0, P_MOD} : ~{1'b0, P_MOD};      // mux2
    res_sub = s1[NADD-1] ? s2[N-1:0] : s1[N-1:0];        // mux3
    res_add = s2[NADD-1] ? s1[N-1:0] : s2[N-1:0];        // mux4
  end

  cla_adder #(.WIDTH(NADD)) u_s1 (
    .a({1'b0, ra}), .b(op_b), .cin(ras), .sum(s1), .cout()
  );
  cla_adder #(.WIDTH(NADD)) u_s2 (
    .a(s1), .b(op_p), .cin(~ras), .sum(s2), .cout()
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      busy <= 1'b0;
      done <= 1'b0;
      out  <= '0;
      ra   <= '0;
      rb   <= '0;
      ras  <= 1'b0;
    end else begin
      busy <= start;
      done <= busy;
      if (start) begin
        ra  <= a;
        rb  <= b;
        ras <= as;
      end
      if (busy) out <= ras ? res_sub : res_add;           // mux5
    end
  end
endmodule
