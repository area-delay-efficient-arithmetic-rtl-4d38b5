// tb_dim1_csa42: self-checking test of the modulo 2^n+1 Dim1 4:2 compressor.
// Exhaustive at n = 4 and n = 1, random at n = 16. The reference adds the four
// Dim1 values as integers and reduces modulo 2^n+1; the output pair must hold
// the same value.
module tb_dim1_csa42;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, c4, d4, s4, y4;
  logic [0:0]  a1, b1, c1, d1, s1, y1;
  logic [15:0] aw, bw, cw, dw, sw, yw;

  dim1_csa42              dut4 (.a(a4), .b(b4), .c(c4), .d(d4), .s(s4), .cy(y4));
  dim1_csa42 #(.N(1))     dut1 (.a(a1), .b(b1), .c(c1), .d(d1), .s(s1), .cy(y1));
  dim1_csa42 #(.N(16))    dutw (.a(aw), .b(bw), .c(cw), .d(dw), .s(sw), .cy(yw));

  task automatic check(input longint m, input longint a, b, c, d, s, y);
    longint want = (a + b + c + d + 4) % m;
    longint got  = (s + y + 2) % m;
    checks++;
    if (want != got) begin
      failures++;
      if (failures < 10)
        $display("FAIL m=%0d in=%0d,%0d,%0d,%0d sum=%0d got s=%0d c=%0d (%0d)",
                 m, a, b, c, d, want, s, y, got);
    end
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a4, b4, c4, d4} = 16'(i);
      #1 check(17, a4, b4, c4, d4, s4, y4);
    end
    for (int i = 0; i < 16; i++) begin
      {a1, b1, c1, d1} = 4'(i);
      #1 check(3, a1, b1, c1, d1, s1, y1);
    end
    for (int i = 0; i < 20000; i++) begin
      aw = 16'($urandom); bw = 16'($urandom); cw = 16'($urandom); dw = 16'($urandom);
      if (i == 0) begin aw = '1; bw = '1; cw = '1; dw = '1; end
      #1 check(65537, aw, bw, cw, dw, sw, yw);
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
