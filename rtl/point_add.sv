// point_add: unified projective point addition on the twisted Edwards curve
// -x^2 + y^2 = 1 + d x^2 y^2 over GF(2^255 - 19):
//     X3 = Z1Z2 (Z1^2Z2^2 - dX1X2Y1Y2)(X1Y2 + Y1X2)
//     Y3 = Z1Z2 (Z1^2Z2^2 + dX1X2Y1Y2)(X1X2 + Y1Y2)
//     Z3 = (Z1^2Z2^2 + dX1X2Y1Y2)(Z1^2Z2^2 - dX1X2Y1Y2)
// The twelve multiplications, one squaring and four additions/subtractions of
// the formula are scheduled in five levels on five radix-4 modular
// multipliers (m0..m4), one modular adder (ad) and one modular adder/
// subtractor (as):
//     L1  m0 = A = Z1Z2   m1 = C = X1X2   m2 = D = Y1Y2   m3 = X1Y2   m4 = Y1X2
//     L2  m0 = B = A^2    m1 = CD         ad = X1Y2 + Y1X2  as = C + D
//     L3  m2 = E = d*CD   m3 = T1 = A*(X1Y2+Y1X2)   m4 = T2 = A*(C+D)
//     L4  as = F = B - E  ad = G = B + E
//     L5  m0 = X3 = T1*F  m1 = Y3 = T2*G  m2 = Z3 = F*G
// A is kept in register reg_a from L1 to L3; every other value waits in the
// output register of the unit that made it.  An FSM starts the units of a
// level together, collects their done pulses (one AND per level over sticky
// done flags) and starts the next level in the same clock cycle.
//
// Timing: inputs need only be valid in the start cycle.  done pulses 522
// cycles after start (four multiplier levels of 130 cycles plus the 2-cycle
// addition level), together with the valid result, which then holds until
// the next operation writes L5.  A start that arrives in the cycle done is
// high is accepted at once (back-to-back operation, as the ladder does).
//
// The resource budget (5 multipliers, 1 adder, 1 adder/subtractor), the five
// levels, the per-level AND of done signals and the back-to-back restart
// follow the design.  The allocation of operations to units and levels is
// this implementation's, chosen to meet that budget and latency; it needs one
// holding register instead of three.  Synchronous active-high reset.
module point_add
  import ecc_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  logic   start,
  input  point_t p1,
  input  point_t p2,
  output point_t p3,
  output logic   done
);
  typedef enum logic [2:0] {S_IDLE, S_L1, S_L2, S_L3, S_L4, S_L5} state_t;

  // unit indices in the done vectors
  localparam int unsigned U_M0 = 0, U_M1 = 1, U_M2 = 2, U_M3 = 3, U_M4 = 4,
                          U_AD = 5, U_AS = 6, NU = 7;

  state_t          state;
  logic [2:0]      go_lvl;          // level being started this cycle (0: none)
  logic [NU-1:0]   u_done, fin, mask;
  logic            lvl_done;
  fe_t             reg_a;

  fe_t  ma [5], mb [5], mo [5];
  logic mstart [5];
  logic [4:0] mdone;
  fe_t  ad_a, ad_b, ad_o, as_a, as_b, as_o;
  logic ad_start, as_start, as_sub, ad_done, as_done;

  for (genvar i = 0; i < 5; i++) begin : g_mul
    mod_mult_r4 u_mul (
      .clock(clock), .reset(reset), .start(mstart[i]),
      .a(ma[i]), .b(mb[i]), .out(mo[i]), .done(mdone[i])
    );
  end

  mod_add u_ad (
    .clock(clock), .reset(reset), .start(ad_start),
    .a(ad_a), .b(ad_b), .out(ad_o), .done(ad_done)
  );

  mod_addsub u_as (
    .clock(clock), .reset(reset), .start(as_start), .as(as_sub),
    .a(as_a), .b(as_b), .out(as_o), .done(as_done)
  );

  assign u_done = {as_done, ad_done, mdone};

  // units whose completion ends the current level
  always_comb begin
    unique case (state)
      S_L1:    mask = NU'(5'b11111);
      S_L2:    mask = (NU'(1) << U_M0) | (NU'(1) << U_M1) | (NU'(1) << U_AD) | (NU'(1) << U_AS);
      S_L3:    mask = (NU'(1) << U_M2) | (NU'(1) << U_M3) | (NU'(1) << U_M4);
      S_L4:    mask = (NU'(1) << U_AD) | (NU'(1) << U_AS);
      S_L5:    mask = (NU'(1) << U_M0) | (NU'(1) << U_M1) | (NU'(1) << U_M2);
      default: mask = '0;
    endcase
    lvl_done = (state != S_IDLE) && (((fin | u_done) & mask) == mask);
  end

  always_comb begin
    go_lvl = 3'd0;
    unique case (state)
      S_IDLE:  if (start) go_lvl = 3'd1;
      S_L1:    if (lvl_done) go_lvl = 3'd2;
      S_L2:    if (lvl_done) go_lvl = 3'd3;
      S_L3:    if (lvl_done) go_lvl = 3'd4;
      S_L4:    if (lvl_done) go_lvl = 3'd5;
      S_L5:    if (lvl_done && start) go_lvl = 3'd1;
      default: go_lvl = 3'd0;
    endcase
  end

  // operand multiplexers and start strobes of every unit
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      ma[i] = '0;
      mb[i] = '0;
      mstart[i] = 1'b0;
    end
    ad_a = '0; ad_b = '0; ad_start = 1'b0;
    as_a = '0; as_b = '0; as_start = 1'b0; as_sub = 1'b0;
    unique case (go_lvl)
      3'd1: begin
        ma[0] = p1.z; mb[0] = p2.z;
        ma[1] = p1.x; mb[1] = p2.x;
        ma[2] = p1.y; mb[2] = p2.y;
        ma[3] = p1.x; mb[3] = p2.y;
        ma[4] = p1.y; mb[4] = p2.x;
        for (int i = 0; i < 5; i++) mstart[i] = 1'b1;
      end
      3'd2: begin
        ma[0] = mo[0]; mb[0] = mo[0];          // B = A^2
        ma[1] = mo[1]; mb[1] = mo[2];          // C*D
        mstart[0] = 1'b1; mstart[1] = 1'b1;
        ad_a = mo[3]; ad_b = mo[4]; ad_start = 1'b1;             // X1Y2 + Y1X2
        as_a = mo[1]; as_b = mo[2]; as_start = 1'b1;             // C + D
      end
      3'd3: begin
        ma[2] = D_CURVE; mb[2] = mo[1];        // E = d*CD
        ma[3] = reg_a;   mb[3] = ad_o;         // T1
        ma[4] = reg_a;   mb[4] = as_o;         // T2
        mstart[2] = 1'b1; mstart[3] = 1'b1; mstart[4] = 1'b1;
      end
      3'd4: begin
        as_a = mo[0]; as_b = mo[2]; as_sub = 1'b1; as_start = 1'b1;   // F = B - E
        ad_a = mo[0]; ad_b = mo[2]; ad_start = 1'b1;                  // G = B + E
      end
      3'd5: begin
        ma[0] = mo[3]; mb[0] = as_o;           // X3 = T1*F
        ma[1] = mo[4]; mb[1] = ad_o;           // Y3 = T2*G
        ma[2] = as_o;  mb[2] = ad_o;           // Z3 = F*G
        mstart[0] = 1'b1; mstart[1] = 1'b1; mstart[2] = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state <= S_IDLE;
      fin   <= '0;
      reg_a <= '0;
    end else begin
      if (go_lvl != 3'd0) fin <= '0;
      else                fin <= fin | u_done;
      if (go_lvl == 3'd2) reg_a <= mo[0];
      unique case (go_lvl)
        3'd1: state <= S_L1;
        3'd2: state <= S_L2;
        3'd3: state <= S_L3;
        3'd4: state <= S_L4;
        3'd5: state <= S_L5;
        default: if (state == S_L5 && lvl_done) state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: start only when idle or in the cycle done is high.
  always_ff @(posedge clock)
    if (!reset) a_start_idle: assert (!(start && state != S_IDLE && !done))
      else $error("point_add: start while busy");

  assign done = (state == S_L5) && lvl_done;
  assign p3   = '{x: mo[0], y: mo[1], z: mo[2]};
endmodule
