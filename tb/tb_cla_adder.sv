// tb_cla_adder: self-checking test of the carry-look-ahead adder at the three
// widths the core uses (256, 257, 258 bits).  Random operands, operands with
// long carry chains (all ones plus one) and both carry-in values are compared
// with the built-in + operator.
module tb_cla_adder;
  logic [255:0] a0, b0, s0;  logic c0, co0;
  logic [256:0] a1, b1, s1;  logic c1, co1;
  logic [257:0] a2, b2, s2;  logic c2, co2;
  int checks = 0, failures = 0;

  cla_adder #(.WIDTH(256)) u0 (.a(a0), .b(b0), .cin(c0), .sum(s0), .cout(co0));
  cla_adder #(.WIDTH(257)) u1 (.a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1));
  cla_adder #(.WIDTH(258)) u2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));

  function automatic logic [259:0] rnd();
    logic [259:0] v;
    for (int i = 0; i < 9; i++) v[32*i +: 32] = $urandom;
    v[259:256] = 4'($urandom);
    return v;
  endfunction

  task automatic check_all();
    logic [256:0] r0; logic [257:0] r1; logic [258:0] r2;
    #1;
    r0 = {1'b0, a0} + {1'b0, b0} + 257'(c0);
    r1 = {1'b0, a1} + {1'b0, b1} + 258'(c1);
    r2 = {1'b0, a2} + {1'b0, b2} + 259'(c2);
    checks += 3;
    if ({co0, s0} !== r0) begin failures++; $display("FAIL w256 a=%h b=%h", a0, b0); end
    if ({co1, s1} !== r1) begin failures++; $display("FAIL w257 a=%h b=%h", a1, b1); end
    if ({co2, s2} !== r2) begin failures++; $display("FAIL w258 a=%h b=%h", a2, b2); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [259:0] x, y;
    for (int n = 0; n < 2000; n++) begin
      x = rnd(); y = rnd();
      a0 = x[255:0]; b0 = y[255:0]; c0 = 1'($urandom);
      a1 = x[256:0]; b1 = y[256:0]; c1 = 1'($urandom);
      a2 = x[257:0]; b2 = y[257:0]; c2 = 1'($urandom);
      check_all();
    end
    // carry rippling through every level of the tree and the extension bits
    a0 = '1; b0 = '0; c0 = 1'b1;
    a1 = '1; b1 = '0; c1 = 1'b1;
    a2 = '1; b2 = 258'd1; c2 = 1'b0;
    check_all();
    for (int k = 0; k < 258; k += 7) begin
      a0 = '1 >> (k % 256); b0 = 256'd1; c0 = 1'b0;
      a1 = '1 >> (k % 257); b1 = 257'd1; c1 = 1'b1;
      a2 = '1 >> k;         b2 = 258'd1; c2 = 1'b1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
