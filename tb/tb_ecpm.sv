// tb_ecpm: self-checking test of the Montgomery-ladder point multiplier at
// full size (255 ladder steps).  Run 1 uses the published test key and
// compares the projective result with the published one.  Run 2 uses a random
// key with its top bit set and compares with a reference ladder computed by
// the testbench.  Both results must lie on the curve and take exactly
// 255 * 522 + 1 = 133111 cycles.  Steps of both kinds (k_i = 0 and 1)
// are counted.
module tb_ecpm;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic   clock = 0, reset = 1, start = 0;
  fe_t    k;
  point_t q;
  logic   done;
  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0;

  localparam fe_t K_TEST = 256'hf9ab30f9f6e0db3d6a254bca6d272be910f5616da13e1f6707298f25e13e94b5;
  localparam point_t Q_TEST = '{
    x: 256'h29ecabfbd1e39aaa5dd78829146d4ec74206bb28c886256e5c213f3080ce2095,
    y: 256'h4704a8f2ef7592ddef13bdcd474490fb1ca8a4661892ba50773452f68ff4614c,
    z: 256'h480472383562faae60c678eb912565d5964a3943c70a27bc093362072dc9e92f
  };

  ecpm dut (.*);
  always #5 clock = ~clock;

  // count ladder steps by the bit they processed
  always @(posedge clock)
    if (dut.step_done) begin
      if (dut.k_sh[N-2]) n_one++; else n_zero++;
    end

  initial begin
    repeat (300000) @(posedge clock);
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
    int lat;
    @(negedge clock); k = key; start = 1;
    @(negedge clock); start = 0; k = ~key;
    lat = 1;
    while (!done) begin @(negedge clock); lat++; end
    checks += 3;
    if (q !== exp_q) begin failures++; $display("FAIL q = %h", q); end
    if (!on_curve(q)) begin failures++; $display("FAIL not on curve"); end
    if (lat != 133111) begin failures++; $display("FAIL latency %0d", lat); end
    $display("ecpm: %0d cycles", lat);
  endtask

  initial begin
    fe_t k2;
    repeat (3) @(negedge clock);
    reset = 0;
    run(K_TEST, Q_TEST);
    k2 = rand_fe();
    k2[255] = 1'b1;
    run(k2, ladder(k2));
    checks++;
    if (n_one == 0 || n_zero == 0) begin failures++; $display("FAIL branch coverage"); end
    $display("steps with k_i=1: %0d, k_i=0: %0d", n_one, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
