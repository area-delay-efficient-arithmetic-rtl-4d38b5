// tb_mrc3_workloads: the converter at all five three-moduli sets evaluated for
// this design: {3,5,17}, {5,17,257}, {5,17,65537}, {5,257,65537} and
// {17,257,65537} (dynamic ranges of 8 to 28 bits). Each instance gets the
// binary residues of random X in its range plus the ends 0 and M-1; the
// digits must be X mod m1, (X/m1) mod m2 and X/(m1*m2).
module tb_mrc3_workloads;
  int checks = 0, failures = 0;

  logic [1:0] ra1, aa1; logic [2:0]  ra2, aa2; logic [4:0]  ra3, aa3;   // {3,5,17}
  logic [2:0] rb1, ab1; logic [4:0]  rb2, ab2; logic [8:0]  rb3, ab3;   // {5,17,257}
  logic [2:0] rc1, ac1; logic [4:0]  rc2, ac2; logic [16:0] rc3, ac3;   // {5,17,65537}
  logic [2:0] rd1, ad1; logic [8:0]  rd2, ad2; logic [16:0] rd3, ad3;   // {5,257,65537}
  logic [4:0] re1, ae1; logic [8:0]  re2, ae2; logic [16:0] re3, ae3;   // {17,257,65537}

  mrc3_top                               ua (.r1(ra1), .r2(ra2), .r3(ra3), .a1(aa1), .a2(aa2), .a3(aa3));
  mrc3_top #(.N1(2), .N2(4), .N3(8))     ub (.r1(rb1), .r2(rb2), .r3(rb3), .a1(ab1), .a2(ab2), .a3(ab3));
  mrc3_top #(.N1(2), .N2(4), .N3(16))    uc (.r1(rc1), .r2(rc2), .r3(rc3), .a1(ac1), .a2(ac2), .a3(ac3));
  mrc3_top #(.N1(2), .N2(8), .N3(16))    ud (.r1(rd1), .r2(rd2), .r3(rd3), .a1(ad1), .a2(ad2), .a3(ad3));
  mrc3_top #(.N1(4), .N2(8), .N3(16))    ue (.r1(re1), .r2(re2), .r3(re3), .a1(ae1), .a2(ae2), .a3(ae3));

  task automatic check(input string name, input longint m1, m2, x, g1, g2, g3);
    longint w1 = x % m1, w2 = (x / m1) % m2, w3 = x / (m1 * m2);
    checks++;
    if (g1 != w1 || g2 != w2 || g3 != w3) begin
      failures++;
      if (failures < 10) $display("FAIL %s X=%0d want %0d,%0d,%0d got %0d,%0d,%0d",
                                  name, x, w1, w2, w3, g1, g2, g3);
    end
  endtask

  function automatic longint pick(input longint range, input int i);
    if (i == 0) return 0;
    if (i == 1) return range - 1;
    return ((longint'($urandom) << 16) ^ longint'($urandom)) % range;
  endfunction

  initial begin
    longint x;
    for (int i = 0; i < 20000; i++) begin
      x = pick(3 * 5 * 17, i);
      ra1 = 2'(x % 3);  ra2 = 3'(x % 5);   ra3 = 5'(x % 17);
      #1 check("{3,5,17}", 3, 5, x, aa1, aa2, aa3);
      x = pick(5 * 17 * 257, i);
      rb1 = 3'(x % 5);  rb2 = 5'(x % 17);  rb3 = 9'(x % 257);
      #1 check("{5,17,257}", 5, 17, x, ab1, ab2, ab3);
      x = pick(longint'(5) * 17 * 65537, i);
      rc1 = 3'(x % 5);  rc2 = 5'(x % 17);  rc3 = 17'(x % 65537);
      #1 check("{5,17,65537}", 5, 17, x, ac1, ac2, ac3);
      x = pick(longint'(5) * 257 * 65537, i);
      rd1 = 3'(x % 5);  rd2 = 9'(x % 257); rd3 = 17'(x % 65537);
      #1 check("{5,257,65537}", 5, 257, x, ad1, ad2, ad3);
      x = pick(longint'(17) * 257 * 65537, i);
      re1 = 5'(x % 17); re2 = 9'(x % 257); re3 = 17'(x % 65537);
      #1 check("{17,257,65537}", 17, 257, x, ae1, ae2, ae3);
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
