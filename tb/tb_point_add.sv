// tb_point_add: self-checking test of the projective point addition.
// Operands are multiples of the base point produced by the reference model
// (so they lie on the curve, with Z != 1).  Each result is compared with the
// reference formula, checked to lie on the curve, and timed: done must come
// 522 cycles after start.  One pair of operations runs back to back, the
// second start given in the cycle of the first done, which must also take
// 522 cycles.
module tb_point_add;
  import ecc_pkg::*;
  import ecc_tb_pkg::*;
  logic   clock = 0, reset = 1, start = 0;
  point_t p1, p2, p3;
  logic   done;
  int checks = 0, failures = 0, back_to_back = 0;

  point_add dut (.*);
  always #5 clock = ~clock;

  initial begin
    repeat (30000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(point_t x, point_t y, int lat);
    point_t e = pt_add(x, y);
    checks += 3;
    if (p3 !== e) begin failures++; $display("FAIL sum %h", p3); end
    if (!on_curve(p3)) begin failures++; $display("FAIL not on curve"); end
    if (lat != 522) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    point_t q1, q2, q3;
    int lat;
    q1 = G_POINT;
    q2 = pt_dbl(G_POINT);
    repeat (3) @(negedge clock);
    reset = 0;
    for (int n = 0; n < 6; n++) begin
      @(negedge clock); p1 = q1; p2 = q2; start = 1;
      @(negedge clock); start = 0; p1 = '0; p2 = '0;
      lat = 1;
      while (!done) begin @(negedge clock); lat++; end
      check(q1, q2, lat);
      q3 = pt_add(q1, q2);
      q1 = q2; q2 = q3;
    end
    // back-to-back: restart in the cycle done is high
    @(negedge clock); p1 = q1; p2 = q2; start = 1;
    @(negedge clock); start = 0;
    lat = 1;
    while (!done) begin @(negedge clock); lat++; end
    check(q1, q2, lat);
    q3 = pt_add(q1, q2);
    p1 = q2; p2 = q3; start = 1;           // still in the done cycle
    @(negedge clock); start = 0; p1 = '0; p2 = '0;
    lat = 1;
    while (!done) begin @(negedge clock); lat++; end
    check(q2, q3, lat);
    back_to_back++;
    checks++;
    if (back_to_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
