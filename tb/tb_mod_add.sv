// tb_mod_add: self-checking test of the modular adder.  Checks the published
// test vector, operands at the edges of the field and random operands against
// (a + b) mod p, and checks that done comes exactly two cycles after start.
module tb_mod_add;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic clock = 0, reset = 1, start = 0;
  fe_t  a, b, out;
  logic done;
  int checks = 0, failures = 0;

  mod_add dut (.*);
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
    if (out !== f_add(x, y)) begin failures++; $display("FAIL %h + %h -> %h", x, y, out); end
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    run(256'd26826903516534128576205990732449246204549756080988166989461034734729464335973,
        256'd57896044618632535464341535436436578412269754886254878645315168469699635187546);
    checks++;
    if (out !== 256'h3b4f7d4345f8078bb201cebf9ae65cde6d55cb91b7a23dc13380eb8009a35dd2) failures++;
    run(P_MOD - 1, P_MOD - 1);
    run(P_MOD - 1, 256'd1);
    run(0, 0);
    for (int n = 0; n < 300; n++) run(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
