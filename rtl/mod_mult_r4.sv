// mod_mult_r4: radix-4 interleaved modular multiplier, out = a * b mod p.
//
// The multiplier B is scanned from its most significant end two bits per
// clock.  A start pulse loads A into the precomputation stage, loads the shift
// register T with {B, 2'b01} (the trailing 01 is an end marker) and clears the
// partial result D.  One precomputation cycle captures A, 2A and 3A.  Each of
// the following cycles then does
//     E  = 4*D + {0, A, 2A, 3A}[T[257:256]]        (E < 7p, 258 bits)
//     R1 = E - q*p, q = E[257:255]                  (multiple of p chosen from the three MSBs)
//     D  = R1 - p if that is not negative, else R1  (the extra check stage)
// and shifts T left by two.  The loop ends when the marker has left
// T[255:0] (an OR over those bits), after N/2 = 128 iterations.  done pulses
// for one cycle 130 clock edges after the edge that sampled start
// (n/2 + 2 cycles), and out (the D register) keeps the product until the
// next start.  Inputs need only be valid in the start cycle.
//
// Since p = 2^255 - 19, E - q*p with q = floor(E / 2^255) lies in
// [0, 2^255 + 114), so a single conditional subtraction of p completes the
// reduction.  The algorithm, the precomputation cycle, the three-MSB
// selection among the constants p..6p and the check stage follow the design.
// This implementation subtracts the selected multiple with one adder instead of
// six parallel subtractors; the registers holding A, 2A and 3A during the loop
// and the synchronous active-high reset are also its own choices.
module mod_mult_r4
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
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_RUN} state_t;

  localparam logic [NMUL-1:0] PW  = {2'b00, P_MOD};
  localparam logic [NMUL-1:0] PW2 = PW * 2;
  localparam logic [NMUL-1:0] PW3 = PW * 3;
  localparam logic [NMUL-1:0] PW4 = PW * 4;
  localparam logic [NMUL-1:0] PW5 = PW * 5;
  localparam logic [NMUL-1:0] PW6 = PW * 6;

  state_t          state;
  logic [NMUL-1:0] pa1, pa2, pa3;        // from the precomputation stage
  logic [NMUL-1:0] m1, m2, m3;           // A, 2A, 3A held during the loop
  logic [NMUL-1:0] t_reg;                // shift register {B, 01}
  fe_t             d_reg;                // partial result
  logic [NMUL-1:0] addend, e_val, qp, r1, r2, t_next;
  logic [2:0]      q_sel;

  mult_r4_precomp u_pre (
    .clock(clock), .reset(reset), .start(start), .a(a),
    .a1(pa1), .a2(pa2), .a3(pa3)
  );

  always_comb begin
    unique case (t_reg[NMUL-1 -: 2])      // MUX1
      2'b01:   addend = m1;
      2'b10:   addend = m2;
      2'b11:   addend = m3;
      default: addend = '0;
    endcase
    q_sel = e_val[NMUL-1 -: 3];
    unique case (q_sel)                   // constants p .. 6p
      3'd1:    qp = PW;
      3'd2:    qp = PW2;
      3'd3:    qp = PW3;
      3'd4:    qp = PW4;
      3'd5:    qp = PW5;
      3'd6:    qp = PW6;
      default: qp = '0;
    endcase
    t_next = t_reg << 2;
  end

  cla_adder #(.WIDTH(NMUL)) u_s_acc (     // E = 4D + digit*A
    .a({d_reg, 2'b00}), .b(addend), .cin(1'b0), .sum(e_val), .cout()
  );
  cla_adder #(.WIDTH(NMUL)) u_s_red (     // R1 = E - q*p
    .a(e_val), .b(~qp), .cin(1'b1), .sum(r1), .cout()
  );
  cla_adder #(.WIDTH(NMUL)) u_s_chk (     // R2 = R1 - p (check stage)
    .a(r1), .b(~PW), .cin(1'b1), .sum(r2), .cout()
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      state <= S_IDLE;
      done  <= 1'b0;
      t_reg <= '0;
      d_reg <= '0;
      m1    <= '0;
      m2    <= '0;
      m3    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          t_reg <= {b, 2'b01};
          d_reg <= '0;
          state <= S_PRE;
        end
        S_PRE: begin
          m1    <= pa1;
          m2    <= pa2;
          m3    <= pa3;
          state <= S_RUN;
        end
        S_RUN: begin
          d_reg <= r2[NMUL-1] ? r1[N-1:0] : r2[N-1:0];   // MUX2 / check
          t_reg <= t_next;
          if (t_next[N-1:0] == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: a new operation may only be requested while idle.
  always_ff @(posedge clock)
    if (!reset) a_start_idle: assert (!(start && state != S_IDLE))
      else $error("mod_mult_r4: start while busy");

  assign out = d_reg;
endmodule
