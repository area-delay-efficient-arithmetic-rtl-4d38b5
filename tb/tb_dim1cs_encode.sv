// tb_dim1cs_encode: self-checking test of the binary to Dim1 carry-save input
// encoder. Every residue 0..2^n of 2^n+1 (n = 4 default, n = 1, n = 16 sampled)
// must encode to a pair whose value (s+1)+(c+1) mod 2^n+1 is the residue, and
// the two worked examples (13 and 16 modulo 17) must give the exact bit
// patterns s=1101 c=1111 and s=0000 c=1110.
module tb_dim1cs_encode;
  int checks = 0, failures = 0;

  logic [4:0]  r4;  logic [3:0]  s4, c4;
  logic [1:0]  r1;  logic [0:0]  s1, c1;
  logic [16:0] rw;  logic [15:0] sw, cw;

  dim1cs_encode           e4 (.r(r4), .s(s4), .c(c4));
  dim1cs_encode #(.N(1))  e1 (.r(r1), .s(s1), .c(c1));
  dim1cs_encode #(.N(16)) ew (.r(rw), .s(sw), .c(cw));

  task automatic check(input longint m, input longint r, s, c);
    checks++;
    if ((s + c + 2) % m != r) begin
      failures++;
      $display("FAIL m=%0d r=%0d s=%0d c=%0d", m, r, s, c);
    end
  endtask

  initial begin
    for (int r = 0; r <= 16; r++) begin
      r4 = 5'(r); #1 check(17, r, s4, c4);
    end
    for (int r = 0; r <= 2; r++) begin
      r1 = 2'(r); #1 check(3, r, s1, c1);
    end
    for (int i = 0; i < 5000; i++) begin
      rw = (i == 0) ? 17'h10000 : 17'($urandom % 65537);
      #1 check(65537, rw, sw, cw);
    end
    r4 = 5'd13; #1;
    checks++;
    if (s4 != 4'b1101 || c4 != 4'b1111) begin failures++; $display("FAIL 13: %b %b", s4, c4); end
    r4 = 5'd16; #1;
    checks++;
    if (s4 != 4'b0000 || c4 != 4'b1110) begin failures++; $display("FAIL 16: %b %b", s4, c4); end
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
