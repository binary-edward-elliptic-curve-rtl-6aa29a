// tb_proj_to_affine: self-checking test of the projective-to-affine converter.
// Converts the published ladder result and several multiples of the base point
// (made by the reference model, with Z != 1) and checks x = X/Z, y = Y/Z and
// that (x, y) satisfies the affine curve equation -x^2 + y^2 = 1 + d x^2 y^2.
// The latency must equal the inverter time plus the 130 multiplier cycles;
// it is checked against a bound and reported.
module tb_proj_to_affine;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic   clock = 0, reset = 1, start = 0;
  point_t pq;
  fe_t    x, y;
  logic   done;
  int checks = 0, failures = 0;

  proj_to_affine dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(point_t pt);
    int lat;
    fe_t zi, ex, ey;
    point_t aff;
    zi = f_inv(pt.z);
    ex = f_mul(pt.x, zi);
    ey = f_mul(pt.y, zi);
    @(negedge clock); pq = pt; start = 1;
    @(negedge clock); start = 0; pq = '0;
    lat = 1;
    while (!done) begin @(negedge clock); lat++; end
    aff = '{x: x, y: y, z: 256'd1};
    checks += 4;
    if (x !== ex) begin failures++; $display("FAIL x %h", x); end
    if (y !== ey) begin failures++; $display("FAIL y %h", y); end
    if (!on_curve(aff)) begin failures++; $display("FAIL not on curve"); end
    if (lat < 131 || lat > 2 * N + 2 + 130) begin failures++; $display("FAIL latency %0d", lat); end
    $display("conversion: %0d cycles", lat);
  endtask

  initial begin
    point_t g;
    repeat (3) @(negedge clock);
    reset = 0;
    run('{x: 256'h29ecabfbd1e39aaa5dd78829146d4ec74206bb28c886256e5c213f3080ce2095,
          y: 256'h4704a8f2ef7592ddef13bdcd474490fb1ca8a4661892ba50773452f68ff4614c,
          z: 256'h480472383562faae60c678eb912565d5964a3943c70a27bc093362072dc9e92f});
    checks++;
    if (x !== 256'h6040cfb1c92d97a508a4a25260e0c9fdf1a737af9bc20b0816a88d2c89266f44 ||
        y !== 256'h63b3e360cf5aeee53678ecd967a4c119b895a37f3f39e7c2fb2be3cdd2611108) begin
      failures++; $display("FAIL published point");
    end
    run(G_POINT);
    g = G_POINT;
    for (int n = 0; n < 6; n++) begin
      g = pt_dbl(pt_add(g, G_POINT));
      run(g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
