// ecc_core: Ed25519 public-key generation core, (x, y) = K*G in affine form.
//
// The point multiplier (ecpm) computes Q = K*G in projective coordinates with
// the Montgomery ladder; when it reports done the converter (proj_to_affine)
// starts on its result and divides X and Y by Z with one modular inversion and
// two multiplications.  Both the projective and the affine result are brought
// out.
//
// Interface: a one-cycle start pulse with k valid in the same cycle (bit 255
// of k is taken as 1).  done_proj pulses when q_proj is valid (133111 cycles
// after start); done pulses when q_x and q_y are valid, about 133111 + 490
// cycles after start depending on Z.  Outputs hold until the next run.
// Composition as in the design; synchronous active-high reset.
module ecc_core
  import ecc_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  logic   start,
  input  fe_t    k,
  output point_t q_proj,
  output logic   done_proj,
  output fe_t    q_x,
  output fe_t    q_y,
  output logic   done
);
  ecpm u_ecpm (
    .clock(clock), .reset(reset), .start(start), .k(k),
    .q(q_proj), .done(done_proj)
  );

  proj_to_affine u_p2a (
    .clock(clock), .reset(reset), .start(done_proj), .pq(q_proj),
    .x(q_x), .y(q_y), .done(done)
  );
endmodule
