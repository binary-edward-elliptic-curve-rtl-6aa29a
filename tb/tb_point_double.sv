// tb_point_double: self-checking test of the projective point doubling.
// Starting from the base point it doubles repeatedly (inputs with Z != 1 after
// the first step) and compares each result with the reference formulas, the
// stored constant 2G, and the curve equation; done must come 264 cycles after
// start.
module tb_point_double;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic   clock = 0, reset = 1, start = 0;
  point_t p1, p2;
  logic   done;
  int checks = 0, failures = 0;

  point_double dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (30000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    point_t q;
    int lat;
    q = G_POINT;
    repeat (3) @(negedge clock);
    reset = 0;
    for (int n = 0; n < 8; n++) begin
      @(negedge clock); p1 = q; start = 1;
      @(negedge clock); start = 0; p1 = '0;
      lat = 1;
      while (!done) begin @(negedge clock); lat++; end
      checks += 3;
      if (p2 !== pt_dbl(q)) begin failures++; $display("FAIL dbl %h", p2); end
      if (!on_curve(p2)) begin failures++; $display("FAIL not on curve"); end
      if (lat != 264) begin failures++; $display("FAIL latency %0d", lat); end
      if (n == 0) begin
        checks++;
        if (p2 !== G2_POINT) begin failures++; $display("FAIL 2G constant"); end
      end
      q = p2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
