// tb_dim1_mult_inv: self-checking test of the constant multiplier modulo
// 2^n+1. The output pair must hold K * ((s+1)+(c+1)) mod 2^n+1, computed with
// integers. Covered: the default (n=2, K=2), the three inverses of the
// {3,5,17} set, an inverse of the {17,257,65537} set, and the corner constants
// K = 1 and K = 2^n (= -1). Exhaustive up to n = 8, random at n = 16.
module tb_dim1_mult_inv;
  int checks = 0, failures = 0;

  logic [1:0]  s0, c0, p0, q0;                 // n=2,  K=2  (|3^-1|_5)
  logic [3:0]  s1, c1, p1, q1, p2, q2, p3, q3; // n=4,  K=6, 7, 16
  logic [7:0]  s4, c4, p4, q4, p5, q5;         // n=8,  K=1, 255
  logic [15:0] sw, cw, pw, qw, px, qx;         // n=16, K=|257^-1|, 12345

  dim1_mult_inv                            m0 (.s(s0), .c(c0), .ps(p0), .pc(q0));
  dim1_mult_inv #(.N(4),  .K(6))           m1 (.s(s1), .c(c1), .ps(p1), .pc(q1));
  dim1_mult_inv #(.N(4),  .K(7))           m2 (.s(s1), .c(c1), .ps(p2), .pc(q2));
  dim1_mult_inv #(.N(4),  .K(16))          m3 (.s(s1), .c(c1), .ps(p3), .pc(q3));
  dim1_mult_inv #(.N(8),  .K(1))           m4 (.s(s4), .c(c4), .ps(p4), .pc(q4));
  dim1_mult_inv #(.N(8),  .K(255))         m5 (.s(s4), .c(c4), .ps(p5), .pc(q5));
  dim1_mult_inv #(.N(16), .K(32641))       mw (.s(sw), .c(cw), .ps(pw), .pc(qw));
  dim1_mult_inv #(.N(16), .K(12345))       mx (.s(sw), .c(cw), .ps(px), .pc(qx));

  task automatic check(input longint m, k, s, c, p, q);
    longint want = (k * ((s + c + 2) % m)) % m;
    longint got  = (p + q + 2) % m;
    checks++;
    if (want != got) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d K=%0d s=%0d c=%0d want %0d got %0d",
                                  m, k, s, c, want, got);
    end
  endtask

  initial begin
    // 257 * 32641 = 1 mod 65537, so 32641 is |257^-1|_65537
    if ((longint'(257) * 32641) % 65537 != 1) begin failures++; $display("bad constant"); end
    for (int i = 0; i < 16; i++) begin
      {s0, c0} = 4'(i); #1 check(5, 2, s0, c0, p0, q0);
    end
    for (int i = 0; i < 256; i++) begin
      {s1, c1} = 8'(i); #1;
      check(17, 6, s1, c1, p1, q1);
      check(17, 7, s1, c1, p2, q2);
      check(17, 16, s1, c1, p3, q3);
    end
    for (int i = 0; i < 65536; i++) begin
      {s4, c4} = 16'(i); #1;
      check(257, 1, s4, c4, p4, q4);
      check(257, 255, s4, c4, p5, q5);
    end
    for (int i = 0; i < 20000; i++) begin
      sw = 16'($urandom); cw = 16'($urandom); #1;
      check(65537, 32641, sw, cw, pw, qw);
      check(65537, 12345, sw, cw, px, qx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
