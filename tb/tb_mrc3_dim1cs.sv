// tb_mrc3_dim1cs: self-checking test of the carry-save mixed radix converter.
// Default moduli {3,5,17}: every one of the 2^14 carry-save input patterns
// (s_i, c_i) is applied; the residues they stand for are reduced to an integer
// X by searching 0..254, and the digits must be X mod 3, (X/3) mod 5 and
// X/15. A second instance with {5,17,257} gets random carry-save patterns
// built around random X. The reference never uses the converter's algorithm.
module tb_mrc3_dim1cs;
  int checks = 0, failures = 0;

  // {3,5,17}
  logic [0:0] s1, c1;  logic [1:0] s2, c2;  logic [3:0] s3, c3;
  logic [1:0] a1;      logic [2:0] a2;      logic [4:0] a3;
  // {5,17,257}
  logic [1:0] t1, d1;  logic [3:0] t2, d2;  logic [7:0] t3, d3;
  logic [2:0] b1;      logic [4:0] b2;      logic [8:0] b3;

  mrc3_dim1cs dut (.s1(s1), .c1(c1), .s2(s2), .c2(c2), .s3(s3), .c3(c3),
                   .a1(a1), .a2(a2), .a3(a3));
  mrc3_dim1cs #(.N1(2), .N2(4), .N3(8)) dut2 (
    .s1(t1), .c1(d1), .s2(t2), .c2(d2), .s3(t3), .c3(d3), .a1(b1), .a2(b2), .a3(b3));

  function automatic longint cs_value(input longint s, c, m);
    return (s + c + 2) % m;
  endfunction

  // Random Dim1 carry-save pair of width n holding residue r modulo 2^n+1.
  task automatic random_pair(input int n, input longint r, output longint s, output longint c);
    longint m = (longint'(1) << n) + 1;
    do begin
      s = longint'($urandom) % (longint'(1) << n);
      c = ((r - s - 2) % m + 2 * m) % m;
    end while (c == (longint'(1) << n));   // c + 1 would be 0: not a Dim1 pattern
  endtask

  task automatic check(input longint m1, m2, x, g1, g2, g3);
    longint w1 = x % m1, w2 = (x / m1) % m2, w3 = x / (m1 * m2);
    checks++;
    if (g1 != w1 || g2 != w2 || g3 != w3) begin
      failures++;
      if (failures < 10) $display("FAIL X=%0d want %0d,%0d,%0d got %0d,%0d,%0d",
                                  x, w1, w2, w3, g1, g2, g3);
    end
  endtask

  initial begin
    longint x, r1, r2, r3, sv, cv;
    for (int i = 0; i < (1 << 14); i++) begin
      {s1, c1, s2, c2, s3, c3} = 14'(i);
      r1 = cs_value(s1, c1, 3);
      r2 = cs_value(s2, c2, 5);
      r3 = cs_value(s3, c3, 17);
      x = 0;
      while (!(x % 3 == r1 && x % 5 == r2 && x % 17 == r3)) x++;
      #1 check(3, 5, x, a1, a2, a3);
    end
    for (int i = 0; i < 20000; i++) begin
      x = longint'($urandom) % (5 * 17 * 257);
      if (i == 0) x = 0;
      if (i == 1) x = 5 * 17 * 257 - 1;
      random_pair(2, x % 5, sv, cv);   t1 = 2'(sv); d1 = 2'(cv);
      random_pair(4, x % 17, sv, cv);  t2 = 4'(sv); d2 = 4'(cv);
      random_pair(8, x % 257, sv, cv); t3 = 8'(sv); d3 = 8'(cv);
      #1 check(5, 17, x, b1, b2, b3);
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
