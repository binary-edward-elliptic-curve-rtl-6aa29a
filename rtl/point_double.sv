// point_double: projective point doubling on the twisted Edwards curve
// -x^2 + y^2 = 1 + d x^2 y^2 over GF(2^255 - 19):
//     X2 = (2X1Y1)(Y1^2 - X1^2 - 2Z1^2)
//     Y2 = (X1^2 - Y1^2)(X1^2 + Y1^2)
//     Z2 = (Y1^2 - X1^2)(Y1^2 - X1^2 - 2Z1^2)
// Four levels on four radix-4 modular multipliers (n0..n3), two modular
// adders (a0, a1) and two modular subtractors (s0, s1):
//     L1  n0 = C = X^2   n1 = D = Y^2   n2 = H = Z^2   n3 = P = XY
//     L2  s0 = F = D - C   s1 = N = C - D   a0 = S = C + D   a1 = 2H = H + H
//     L3  s0 = J = F - 2H  a1 = 2P = P + P          (F saved in reg_f)
//     L4  n0 = X2 = 2P*J   n1 = Y2 = N*S   n2 = Z2 = F*J
// An FSM starts the units of a level together, waits for all their done
// pulses (sticky flags ANDed per level) and starts the next level in the
// same cycle.
//
// Timing: inputs need only be valid in the start cycle; done pulses 264
// cycles after start (two multiplier levels of 130 cycles and two 2-cycle
// addition levels) with the valid result, which holds until the next
// operation.  The resource budget (4 multipliers, 2 adders, 2 subtractors),
// the four levels of which two are additions, and the 264-cycle latency follow
// the design; the allocation of operations to units is this implementation's.
// Synchronous active-high reset.
module point_double
  import ecc_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  logic   start,
  input  point_t p1,
  output point_t p2,
  output logic   done
);
  typedef enum logic [2:0] {S_IDLE, S_L1, S_L2, S_L3, S_L4} state_t;

  localparam int unsigned NU = 8;   // n0..n3, a0, a1, s0, s1
  localparam logic [NU-1:0] MASK_MUL4 = 8'b0000_1111;
  localparam logic [NU-1:0] MASK_ADD  = 8'b1111_0000;
  localparam logic [NU-1:0] MASK_L3   = 8'b0110_0000;  // a1, s0
  localparam logic [NU-1:0] MASK_MUL3 = 8'b0000_0111;

  state_t        state;
  logic [2:0]    go_lvl;
  logic [NU-1:0] u_done, fin, mask;
  logic          lvl_done;
  fe_t           reg_f;

  fe_t  na [4], nb [4], no [4];
  logic nstart [4];
  logic [3:0] ndone;
  fe_t  aa [2], ab [2], ao [2], sa [2], sb [2], so [2];
  logic astart [2], sstart [2];
  logic [1:0] adone, sdone;

  for (genvar i = 0; i < 4; i++) begin : g_mul
    mod_mult_r4 u_mul (
      .clock(clock), .reset(reset), .start(nstart[i]),
      .a(na[i]), .b(nb[i]), .out(no[i]), .done(ndone[i])
    );
  end
  for (genvar i = 0; i < 2; i++) begin : g_add
    mod_add u_add (
      .clock(clock), .reset(reset), .start(astart[i]),
      .a(aa[i]), .b(ab[i]), .out(ao[i]), .done(adone[i])
    );
    mod_sub u_sub (
      .clock(clock), .reset(reset), .start(sstart[i]),
      .a(sa[i]), .b(sb[i]), .out(so[i]), .done(sdone[i])
    );
  end

  assign u_done = {sdone, adone, ndone};

  always_comb begin
    unique case (state)
      S_L1:    mask = MASK_MUL4;
      S_L2:    mask = MASK_ADD;
      S_L3:    mask = MASK_L3;
      S_L4:    mask = MASK_MUL3;
      default: mask = '0;
    endcase
    lvl_done = (state != S_IDLE) && (((fin | u_done) & mask) == mask);
    go_lvl = 3'd0;
    unique case (state)
      S_IDLE:  if (start) go_lvl = 3'd1;
      S_L1:    if (lvl_done) go_lvl = 3'd2;
      S_L2:    if (lvl_done) go_lvl = 3'd3;
      S_L3:    if (lvl_done) go_lvl = 3'd4;
      default: go_lvl = 3'd0;
    endcase
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      na[i] = '0; nb[i] = '0; nstart[i] = 1'b0;
    end
    for (int i = 0; i < 2; i++) begin
      aa[i] = '0; ab[i] = '0; astart[i] = 1'b0;
      sa[i] = '0; sb[i] = '0; sstart[i] = 1'b0;
    end
    unique case (go_lvl)
      3'd1: begin
        na[0] = p1.x; nb[0] = p1.x;
        na[1] = p1.y; nb[1] = p1.y;
        na[2] = p1.z; nb[2] = p1.z;
        na[3] = p1.x; nb[3] = p1.y;
        for (int i = 0; i < 4; i++) nstart[i] = 1'b1;
      end
      3'd2: begin
        sa[0] = no[1]; sb[0] = no[0]; sstart[0] = 1'b1;   // F = D - C
        sa[1] = no[0]; sb[1] = no[1]; sstart[1] = 1'b1;   // N = C - D
        aa[0] = no[0]; ab[0] = no[1]; astart[0] = 1'b1;   // S = C + D
        aa[1] = no[2]; ab[1] = no[2]; astart[1] = 1'b1;   // 2H
      end
      3'd3: begin
        sa[0] = so[0]; sb[0] = ao[1]; sstart[0] = 1'b1;   // J = F - 2H
        aa[1] = no[3]; ab[1] = no[3]; astart[1] = 1'b1;   // 2P
      end
      3'd4: begin
        na[0] = ao[1]; nb[0] = so[0];                     // X2 = 2P*J
        na[1] = so[1]; nb[1] = ao[0];                     // Y2 = N*S
        na[2] = reg_f; nb[2] = so[0];                     // Z2 = F*J
        for (int i = 0; i < 3; i++) nstart[i] = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state <= S_IDLE;
      fin   <= '0;
      reg_f <= '0;
    end else begin
      if (go_lvl != 3'd0) fin <= '0;
      else                fin <= fin | u_done;
      if (go_lvl == 3'd3) reg_f <= so[0];
      unique case (go_lvl)
        3'd1: state <= S_L1;
        3'd2: state <= S_L2;
        3'd3: state <= S_L3;
        3'd4: state <= S_L4;
        default: if (state == S_L4 && lvl_done) state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: a new operation may only be requested while idle.
  always_ff @(posedge clock)
    if (!reset) a_start_idle: assert (!(start && state != S_IDLE))
      else $error("point_double: start while busy");

  assign done = (state == S_L4) && lvl_done;
  assign p2   = '{x: no[0], y: no[1], z: no[2]};
endmodule
