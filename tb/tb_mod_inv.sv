// tb_mod_inv: self-checking test of the modular inverter.  For edge operands
// (1, 2, p-1, the published Z coordinate) and random operands it checks that
// out equals b^(p-2) mod p, that out * b = 1 mod p, and that the cycle count
// stays within the bound of 2n + 2 cycles of the algorithm; it reports the
// mean and the largest count seen.
module tb_mod_inv;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic clock = 0, reset = 1, start = 0;
  fe_t  b, out;
  logic done;
  int checks = 0, failures = 0;
  int lat_max = 0, lat_sum = 0, runs = 0;

  mod_inv dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t x);
    int lat;
    @(negedge clock); b = x; start = 1;
    @(negedge clock); start = 0; b = ~x;
    lat = 1;
    while (!done && lat < 2000) begin @(negedge clock); lat++; end
    checks += 3;
    if (out !== f_inv(x)) begin failures++; $display("FAIL inv(%h) -> %h", x, out); end
    if (f_mul(out, x) !== 256'd1) begin failures++; $display("FAIL product"); end
    if (lat > 2 * N + 2) begin failures++; $display("FAIL latency %0d", lat); end
    runs++; lat_sum += lat;
    if (lat > lat_max) lat_max = lat;
  endtask

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    run(256'd1);
    run(256'd2);
    run(P_MOD - 1);
    run(256'h480472383562faae60c678eb912565d5964a3943c70a27bc093362072dc9e92f);
    for (int n = 0; n < 100; n++) run(rand_fe() | 256'd1);
    $display("inverter cycles: mean %0d max %0d", lat_sum / runs, lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
