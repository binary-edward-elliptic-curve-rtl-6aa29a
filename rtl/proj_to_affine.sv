// proj_to_affine: conversion of a projective point (X:Y:Z) to affine
// coordinates, x = X * Z^-1 mod p and y = Y * Z^-1 mod p.
//
// A start pulse registers X and Y and starts the modular inverter on Z.  When
// the inverter reports done, both radix-4 multipliers start in the same cycle
// on (X, Z^-1) and (Y, Z^-1); their common done is the done of the block.
// The stages are chained by their done signals, with no FSM of their own.
// Latency: inverter time (operand dependent, about 360 cycles for random Z) plus
// 130 cycles.  Inputs need only be valid in the start cycle; outputs hold
// until the next conversion.  One inverter, two multipliers and one register
// follow the design; the synchronous active-high reset is this
// implementation's choice.
module proj_to_affine
  import ecc_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  logic   start,
  input  point_t pq,
  output fe_t    x,
  output fe_t    y,
  output logic   done
);
  fe_t  reg_x, reg_y, z_inv;
  logic inv_done, mx_done, my_done;

  always_ff @(posedge clock) begin
    if (reset) begin
      reg_x <= '0;
      reg_y <= '0;
    end else if (start) begin
      reg_x <= pq.x;
      reg_y <= pq.y;
    end
  end

  mod_inv u_inv (
    .clock(clock), .reset(reset), .start(start),
    .b(pq.z), .out(z_inv), .done(inv_done)
  );

  mod_mult_r4 u_mx (
    .clock(clock), .reset(reset), .start(inv_done),
    .a(reg_x), .b(z_inv), .out(x), .done(mx_done)
  );

  mod_mult_r4 u_my (
    .clock(clock), .reset(reset), .start(inv_done),
    .a(reg_y), .b(z_inv), .out(y), .done(my_done)
  );

  assign done = mx_done & my_done;
endmodule
