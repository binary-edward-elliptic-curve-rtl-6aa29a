// tb_mult_r4_precomp: self-checking test of the radix-4 precomputation stage.
// After a start pulse the outputs must be A, 2A and 3A of the loaded operand,
// and they must hold while start stays low and the input changes.
module tb_mult_r4_precomp;
  import ecc_pkg::*;
  logic clock = 0, reset = 1, start = 0;
  fe_t  a;
  logic [NMUL-1:0] a1, a2, a3;
  int checks = 0, failures = 0;

  mult_r4_precomp dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (10000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t x;
    repeat (3) @(negedge clock);
    reset = 0;
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 8; i++) x[32*i +: 32] = $urandom;
      if (n == 0) x = '1;
      @(negedge clock); a = x; start = 1;
      @(negedge clock); start = 0; a = ~x;
      @(negedge clock);
      checks += 3;
      if (a1 !== NMUL'(x))      begin failures++; $display("FAIL A");  end
      if (a2 !== NMUL'(x) * 2)  begin failures++; $display("FAIL 2A"); end
      if (a3 !== NMUL'(x) * 3)  begin failures++; $display("FAIL 3A"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
