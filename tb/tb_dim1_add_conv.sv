// tb_dim1_add_conv: self-checking test of the Dim1 carry-propagate adder with
// conversion to binary. The result must equal (s+1)+(c+1) reduced modulo
// 2^n+1, computed with integers. Exhaustive at n = 4 and n = 1, random plus
// the zero and 2^n corner cases at n = 16.
module tb_dim1_add_conv;
  int checks = 0, failures = 0;
  int zeros = 0, tops = 0;

  logic [3:0]  s4, c4;  logic [4:0]  a4;
  logic [0:0]  s1, c1;  logic [1:0]  a1;
  logic [15:0] sw, cw;  logic [16:0] aw;

  dim1_add_conv           dut4 (.s(s4), .c(c4), .a(a4));
  dim1_add_conv #(.N(1))  dut1 (.s(s1), .c(c1), .a(a1));
  dim1_add_conv #(.N(16)) dutw (.s(sw), .c(cw), .a(aw));

  task automatic check(input longint m, input longint s, c, a);
    longint want = (s + c + 2) % m;
    checks++;
    if (want == 0) zeros++;
    if (want == m - 1) tops++;
    if (a != want) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d s=%0d c=%0d want %0d got %0d", m, s, c, want, a);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      {s4, c4} = 8'(i);
      #1 check(17, s4, c4, a4);
    end
    for (int i = 0; i < 4; i++) begin
      {s1, c1} = 2'(i);
      #1 check(3, s1, c1, a1);
    end
    for (int i = 0; i < 20000; i++) begin
      sw = 16'($urandom);
      cw = 16'($urandom);
      if (i == 0) cw = 16'hFFFF - sw;               // value 0
      if (i == 1) begin sw = 16'hFFFF; cw = 16'hFFFF; end
      if (i == 2) cw = 16'(65535 - 1 - 32'(sw));    // value 2^16
      #1 check(65537, sw, cw, aw);
    end
    if (zeros == 0 || tops == 0) failures++;
    $display("zero results %0d, 2^n results %0d", zeros, tops);
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
