// tb_mod_sub: self-checking test of the modular subtractor.  Checks the published
// test vector, operands at the edges of the field and random operands against
// (a - b) mod p, and checks that done comes exactly two cycles after start.
module tb_mod_sub;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic clock = 0, reset = 1, start = 0;
  fe_t  a, b, out;
  logic done;
  int checks = 0, failures = 0;

  mod_sub dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t x, fe_t y);
    int lat = 0;
    @(negedge clock); a = x; b = y; start = 1;
    @(negedge clock); start = 0; a = '0; b = '0;
    lat = 1;
    while (!done) begin @(negedge clock); lat++; end
    checks += 2;
    if (out !== f_sub(x, y)) begin failures++; $display("FAIL %h - %h -> %h", x, y, out); end
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    run(0, 256'd1);
    run(256'd1, P_MOD - 1);
    run(P_MOD - 1, 0);
    run(P_MOD - 1, P_MOD - 1);
    run(P_MOD - 1, 256'd1);
    run(0, 0);
    for (int n = 0; n < 300; n++) run(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
