// tb_mod_addsub: self-checking test of the combined modular adder/subtractor.
// Random and edge operands in both modes are compared with (a +/- b) mod p;
// the latency (done two cycles after start) is checked every time.
module tb_mod_addsub;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic clock = 0, reset = 1, start = 0, as = 0;
  fe_t  a, b, out;
  logic done;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;

  mod_addsub dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic sub, fe_t x, fe_t y);
    int lat;
    fe_t exp_v;
    @(negedge clock); a = x; b = y; as = sub; start = 1;
    @(negedge clock); start = 0; a = '0; b = '0; as = ~sub;
    lat = 1;
    while (!done) begin @(negedge clock); lat++; end
    exp_v = sub ? f_sub(x, y) : f_add(x, y);
    if (sub) n_sub++; else n_add++;
    checks += 2;
    if (out !== exp_v) begin failures++; $display("FAIL as=%0d %h %h -> %h", sub, x, y, out); end
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    run(0, P_MOD - 1, P_MOD - 1);
    run(1, 0, P_MOD - 1);
    run(1, P_MOD - 1, P_MOD - 1);
    run(0, 0, 0);
    for (int n = 0; n < 400; n++) run(1'($urandom), rand_fe(), rand_fe());
    checks++;
    if (n_add == 0 || n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
