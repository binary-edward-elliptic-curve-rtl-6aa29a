// mod_inv: modular inverter, out = b^-1 mod p over GF(2^255 - 19).
//
// Binary extended-Euclid iteration on four registers q, r, s, t that keep the
// invariants s*b = q and t*b = r (mod p), starting from q = b, r = p, s = 1,
// t = 0 and ending when q = 1, where s is the inverse.  Every clock does one
// combined step:
//   * q even and/or r even: halve each even one, and halve its companion
//     modulo p (s/2 when s is even, (s + p)/2 when odd; likewise t);
//   * both odd: subtract the smaller of q, r from the larger (q - r or r - q),
//     subtract the companions modulo p (s - t, or s - t + p when negative),
//     and halve both results at once (the difference of two odd numbers is even).
// The step uses five 258-bit carry-look-ahead adders: q - r, the companion
// difference, its + p correction and the two halving adders.  s and t stay in
// [0, p) throughout, so no final reduction is needed.  A start pulse loads b;
// done pulses for one cycle with the result when q reaches 1 (or at once with
// result 0 if b = 0, which has no inverse).  The number of cycles depends on
// the operand: about 355 steps for random operands, at most about 2n.
//
// Algorithm 3 of the design (the q, r, s, t registers and their update rules)
// is followed; merging each subtraction with the halving that always follows
// it into one clock step, and leaving out the two-stage pipelined FSM, are
// this implementation's choices.  Synchronous active-high reset.
module mod_inv
  import ecc_pkg::*;
(
  input  logic clock,
  input  logic reset,
  input  logic start,
  input  fe_t  b,
  output fe_t  out,
  output logic done
);
  localparam logic [NMUL-1:0] PW = {2'b00, P_MOD};

  logic            busy;
  fe_t             q, r, s, t;
  logic            q_even, r_even, both_odd, q_ge_r, q_is_one;
  logic [NMUL-1:0] dqr, du, dup, hs_sum, ht_sum;
  fe_t             u, v, m, hs_in, ht_in, s_half, t_half, dqr_half;

  always_comb begin
    q_even   = ~q[0];
    r_even   = ~r[0];
    both_odd = q[0] & r[0];
    q_ge_r   = ~dqr[NMUL-1];                  // sign of q - r
    q_is_one = (q[N-1:1] == '0);              // q < 2
    // companion operands for the modular subtraction
    u = q_ge_r ? s : t;
    v = q_ge_r ? t : s;
    m = du[NMUL-1] ? dup[N-1:0] : du[N-1:0];  // (u - v) mod p
    // halving inputs
    hs_in = (both_odd &  q_ge_r) ? m : s;
    ht_in = (both_odd & ~q_ge_r) ? m : t;
    // (q - r)/2 or (r - q)/2 : the magnitude of the difference, halved
    dqr_half = q_ge_r ? dqr[N:1] : fe_t'((~dqr + 1'b1) >> 1);
  end

  cla_adder #(.WIDTH(NMUL)) u_dqr (            // q - r
    .a({2'b00, q}), .b(~{2'b00, r}), .cin(1'b1), .sum(dqr), .cout()
  );
  cla_adder #(.WIDTH(NMUL)) u_du (             // u - v
    .a({2'b00, u}), .b(~{2'b00, v}), .cin(1'b1), .sum(du), .cout()
  );
  cla_adder #(.WIDTH(NMUL)) u_dup (            // u - v + p
    .a(du), .b(PW), .cin(1'b0), .sum(dup), .cout()
  );
  cla_adder #(.WIDTH(NMUL)) u_hs (             // s + p for odd s
    .a({2'b00, hs_in}), .b(hs_in[0] ? PW : '0), .cin(1'b0), .sum(hs_sum), .cout()
  );
  cla_adder #(.WIDTH(NMUL)) u_ht (             // t + p for odd t
    .a({2'b00, ht_in}), .b(ht_in[0] ? PW : '0), .cin(1'b0), .sum(ht_sum), .cout()
  );

  assign s_half = hs_sum[N:1];
  assign t_half = ht_sum[N:1];

  always_ff @(posedge clock) begin
    if (reset) begin
      busy <= 1'b0;
      done <= 1'b0;
      out  <= '0;
      q    <= '0;
      r    <= '0;
      s    <= '0;
      t    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q    <= b;
          r    <= P_MOD;
          s    <= 256'd1;
          t    <= '0;
          busy <= 1'b1;
        end
      end else if (q_is_one) begin
        out  <= q[0] ? s : '0;                 // q = 0 only for b = 0
        done <= 1'b1;
        busy <= 1'b0;
      end else if (both_odd) begin
        if (q_ge_r) begin
          q <= dqr_half;
          s <= s_half;
        end else begin
          r <= dqr_half;
          t <= t_half;
        end
      end else begin
        if (q_even) begin
          q <= q >> 1;
          s <= s_half;
        end
        if (r_even) begin
          r <= r >> 1;
          t <= t_half;
        end
      end
    end
  end

  // Handshake rule: a new inversion may only be requested while idle.
  always_ff @(posedge clock)
    if (!reset) a_start_idle: assert (!(start && busy))
      else $error("mod_inv: start while busy");
endmodule
