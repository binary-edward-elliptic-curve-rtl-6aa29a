// ecpm: elliptic-curve point multiplication Q = K*G on Ed25519 by the
// left-to-right Montgomery ladder, in projective coordinates.
//
// The ladder keeps Q1 and Q2 = Q1 + G.  The most significant key bit is
// taken to be 1, so the ladder starts from the stored constants Q1 = G and
// Q2 = 2G and then walks key bits 254 down to 0.  For each bit k_i the point
// addition (Q1 + Q2) and the point doubling (2*Q2 if k_i = 1, else 2*Q1) run
// in parallel; when both are done the results are steered back:
//     k_i = 1:  Q1 <- Q1 + Q2,  Q2 <- 2*Q2
//     k_i = 0:  Q2 <- Q1 + Q2,  Q1 <- 2*Q1
// The doubling is shorter, so each step lasts as long as the point addition.
// The steered values feed the adder and doubler inputs combinationally, so
// the next step starts in the same cycle the point addition reports done
// (the doubler's input is picked with the next key bit, k_{i-1}).  The units
// hold their results, so no Q1/Q2 registers are needed between steps.  After the
// last bit Q1 is captured in the result register.
//
// Interface: start is a one-cycle pulse; k must be valid in that cycle only.
// done pulses for one cycle 255 * 522 + 1 = 133111 cycles after start, with q
// valid; q holds until the next result.  Bit 255 of k is not used: a key whose
// top bit is 0 yields (k + 2^255)*G.
//
// The ladder, the start from G and 2G with the top bit fixed to 1, the parallel
// addition and doubling, the combinational turnaround and the latency follow
// the design.  The key is shifted out of a shift register as in the design; the
// state and counter encoding and the synchronous active-high reset are this
// implementation's.
module ecpm
  import ecc_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  logic   start,
  input  fe_t    k,
  output point_t q,
  output logic   done
);
  localparam int unsigned STEPS = N - 1;       // bits 254 .. 0

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t      state;
  logic [N-2:0] k_sh;                          // k_sh[N-2] is the current bit
  logic [7:0]  step;                           // steps completed
  logic        pd_fin;
  logic        step_done, last_step;
  point_t      pa_in1, pa_in2, pd_in, pa_out, pd_out, q1_nx, q2_nx;
  logic        pa_start, pd_start, pa_done, pd_done, next_bit;

  point_add u_pa (
    .clock(clock), .reset(reset), .start(pa_start),
    .p1(pa_in1), .p2(pa_in2), .p3(pa_out), .done(pa_done)
  );

  point_double u_pd (
    .clock(clock), .reset(reset), .start(pd_start),
    .p1(pd_in), .p2(pd_out), .done(pd_done)
  );

  always_comb begin
    step_done = (state == S_RUN) && pa_done && (pd_fin || pd_done);
    last_step = (step == 8'(STEPS - 1));
    // ladder update selected by the current bit
    q1_nx = k_sh[N-2] ? pa_out : pd_out;
    q2_nx = k_sh[N-2] ? pd_out : pa_out;
    if (state == S_IDLE) begin
      next_bit = k[N-2];
      pa_in1   = G_POINT;
      pa_in2   = G2_POINT;
      pd_in    = next_bit ? G2_POINT : G_POINT;
      pa_start = start;
    end else begin
      next_bit = k_sh[N-3];
      pa_in1   = q1_nx;
      pa_in2   = q2_nx;
      pd_in    = next_bit ? q2_nx : q1_nx;
      pa_start = step_done && !last_step;
    end
    pd_start = pa_start;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state  <= S_IDLE;
      k_sh   <= '0;
      step   <= '0;
      pd_fin <= 1'b0;
      q      <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (pd_start)     pd_fin <= 1'b0;
      else if (pd_done) pd_fin <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          k_sh  <= k[N-2:0];
          step  <= '0;
          state <= S_RUN;
        end
        S_RUN: if (step_done) begin
          if (last_step) begin
            q     <= q1_nx;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            k_sh <= k_sh << 1;
            step <= step + 8'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: a new multiplication may only be requested while idle.
  always_ff @(posedge clock)
    if (!reset) a_start_idle: assert (!(start && state != S_IDLE))
      else $error("ecpm: start while busy");
endmodule
