// tb_ecc_core: end-to-end test of the whole core at its default size.
// Generates the public key of the published test key: the projective ladder
// result must equal the published one, arrive after exactly 133111 cycles,
// and convert to the affine point (x, y) = K*G, which must satisfy the curve
// equation.  A second run with a random key (top bit set) is compared with a
// reference model of the ladder and the conversion.
// Mechanisms counted (each must occur): ladder steps with k_i = 1 and with
// k_i = 0, back-to-back restarts of the point adder in the cycle it finishes,
// the point doubler finishing before the adder (ladder waiting on the adder),
// inverter subtraction steps and inverter halving-only steps.
module tb_ecc_core;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic   clock = 0, reset = 1, start = 0;
  fe_t    k, q_x, q_y;
  point_t q_proj;
  logic   done_proj, done;
  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0, n_restart = 0, n_pd_wait = 0, n_inv_sub = 0, n_inv_half = 0;

  localparam fe_t K_TEST = 256'hf9ab30f9f6e0db3d6a254bca6d272be910f5616da13e1f6707298f25e13e94b5;

  ecc_core dut (.*);
  always #5 clock = ~clock;

  always @(posedge clock) begin
    if (dut.u_ecpm.step_done) begin
      if (dut.u_ecpm.k_sh[N-2]) n_one++; else n_zero++;
      if (dut.u_ecpm.pd_fin) n_pd_wait++;
    end
    if (dut.u_ecpm.u_pa.state == dut.u_ecpm.u_pa.S_L5 && dut.u_ecpm.u_pa.go_lvl == 3'd1)
      n_restart++;
    if (dut.u_p2a.u_inv.busy && !dut.u_p2a.u_inv.q_is_one) begin
      if (dut.u_p2a.u_inv.both_odd) n_inv_sub++; else n_inv_half++;
    end
  end

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic point_t ladder(fe_t key);
    point_t r1 = G_POINT, r2 = pt_dbl(G_POINT), s;
    for (int i = N - 2; i >= 0; i--) begin
      s = pt_add(r1, r2);
      if (key[i]) begin r2 = pt_dbl(r2); r1 = s; end
      else        begin r1 = pt_dbl(r1); r2 = s; end
    end
    return r1;
  endfunction

  task automatic run(fe_t key, point_t exp_q);
    int lat, lat_proj;
    fe_t zi;
    point_t aff;
    zi = f_inv(exp_q.z);
    @(negedge clock); k = key; start = 1;
    @(negedge clock); start = 0; k = '0;
    lat = 1; lat_proj = 0;
    while (!done) begin
      if (done_proj) lat_proj = lat;
      @(negedge clock); lat++;
    end
    aff = '{x: q_x, y: q_y, z: 256'd1};
    checks += 5;
    if (q_proj !== exp_q) begin failures++; $display("FAIL projective %h", q_proj); end
    if (lat_proj != 133111) begin failures++; $display("FAIL ladder latency %0d", lat_proj); end
    if (q_x !== f_mul(exp_q.x, zi)) begin failures++; $display("FAIL x %h", q_x); end
    if (q_y !== f_mul(exp_q.y, zi)) begin failures++; $display("FAIL y %h", q_y); end
    if (!on_curve(aff)) begin failures++; $display("FAIL affine point not on curve"); end
    $display("key %h: ladder %0d cycles, total %0d cycles", key, lat_proj, lat);
    $display("  x = %h", q_x);
    $display("  y = %h", q_y);
  endtask

  initial begin
    fe_t k2;
    repeat (3) @(negedge clock);
    reset = 0;
    run(K_TEST, '{x: 256'h29ecabfbd1e39aaa5dd78829146d4ec74206bb28c886256e5c213f3080ce2095,
                   y: 256'h4704a8f2ef7592ddef13bdcd474490fb1ca8a4661892ba50773452f68ff4614c,
                   z: 256'h480472383562faae60c678eb912565d5964a3943c70a27bc093362072dc9e92f});
    checks += 2;
    if (q_x !== 256'h6040cfb1c92d97a508a4a25260e0c9fdf1a737af9bc20b0816a88d2c89266f44) failures++;
    if (q_y !== 256'h63b3e360cf5aeee53678ecd967a4c119b895a37f3f39e7c2fb2be3cdd2611108) failures++;
    k2 = rand_fe();
    k2[255] = 1'b1;
    run(k2, ladder(k2));
    $display("mechanisms: k_i=1 steps %0d, k_i=0 steps %0d, adder restarts %0d, doubler-first waits %0d, inverter subtract steps %0d, halving steps %0d",
             n_one, n_zero, n_restart, n_pd_wait, n_inv_sub, n_inv_half);
    checks += 6;
    if (n_one == 0)      begin failures++; $display("FAIL no k_i=1 step"); end
    if (n_zero == 0)     begin failures++; $display("FAIL no k_i=0 step"); end
    if (n_restart == 0)  begin failures++; $display("FAIL no back-to-back restart"); end
    if (n_pd_wait == 0)  begin failures++; $display("FAIL doubler never finished first"); end
    if (n_inv_sub == 0)  begin failures++; $display("FAIL no inverter subtract step"); end
    if (n_inv_half == 0) begin failures++; $display("FAIL no inverter halving step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
