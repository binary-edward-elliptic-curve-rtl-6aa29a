// tb_mod_mult_r4: self-checking test of the radix-4 modular multiplier.
// Checks the published test vector, extreme operands (p-1, operands that make
// the partial result approach 7p) and random operands against a*b mod p, and
// checks the latency: done 130 cycles (n/2 + 2) after start.
module tb_mod_mult_r4;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic clock = 0, reset = 1, start = 0;
  fe_t  a, b, out;
  logic done;
  int checks = 0, failures = 0;

  mod_mult_r4 dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t x, fe_t y);
    int lat;
    @(negedge clock); a = x; b = y; start = 1;
    @(negedge clock); start = 0; a = ~x; b = ~y;
    lat = 1;
    while (!done) begin @(negedge clock); lat++; end
    checks += 2;
    if (out !== f_mul(x, y)) begin failures++; $display("FAIL %h * %h -> %h", x, y, out); end
    if (lat != 130) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    run(256'd8147683625340390487245337256582588226224617713433078006524389531107657873571,
        256'd15112221349535400772501151409588531511454012693041857206046113283949847762202);
    checks++;
    if (out !== 256'h0803644543cfa1951232c9c47ed0ea89b11ecb00d70501c0b2aafc2e24c541e4) begin
      failures++; $display("FAIL published vector");
    end
    run(P_MOD - 1, P_MOD - 1);
    run(P_MOD - 1, 256'd1);
    run(P_MOD - 20, P_MOD - 2);
    run(0, P_MOD - 1);
    run(256'd1, 256'd1);
    for (int n = 0; n < 150; n++) run(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
