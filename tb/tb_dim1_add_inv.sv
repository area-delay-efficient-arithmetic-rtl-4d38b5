// tb_dim1_add_inv: self-checking test of the cross-modulus additive inverse.
// For every input pair (s, c) modulo 2^ni+1 the output pair modulo 2^nj+1
// must hold -r, where r = ((s+1)+(c+1)) mod 2^ni+1, all computed with
// integers. Exhaustive for (ni,nj) = (1,2) [default], (2,4), (4,16), (8,16).
module tb_dim1_add_inv;
  int checks = 0, failures = 0;
  int wraps = 0;

  logic [0:0] s12, c12; logic [1:0]  p12, q12;
  logic [1:0] s24, c24; logic [3:0]  p24, q24;
  logic [3:0] s416, c416; logic [15:0] p416, q416;
  logic [7:0] s816, c816; logic [15:0] p816, q816;

  dim1_add_inv                     d12  (.s(s12),  .c(c12),  .p(p12),  .q(q12));
  dim1_add_inv #(.NI(2), .NJ(4))   d24  (.s(s24),  .c(c24),  .p(p24),  .q(q24));
  dim1_add_inv #(.NI(4), .NJ(16))  d416 (.s(s416), .c(c416), .p(p416), .q(q416));
  dim1_add_inv #(.NI(8), .NJ(16))  d816 (.s(s816), .c(c816), .p(p816), .q(q816));

  task automatic check(input int ni, nj, input longint s, c, p, q);
    longint mi = (longint'(1) << ni) + 1;
    longint mj = (longint'(1) << nj) + 1;
    longint r  = (s + c + 2) % mi;
    longint want = (mj - r) % mj;
    longint got  = (p + q + 2) % mj;
    checks++;
    if (s + c + 2 >= mi) wraps++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL ni=%0d nj=%0d s=%0d c=%0d want %0d got %0d",
                                  ni, nj, s, c, want, got);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      {s12, c12} = 2'(i); #1 check(1, 2, s12, c12, p12, q12);
    end
    for (int i = 0; i < 16; i++) begin
      {s24, c24} = 4'(i); #1 check(2, 4, s24, c24, p24, q24);
    end
    for (int i = 0; i < 256; i++) begin
      {s416, c416} = 8'(i); #1 check(4, 16, s416, c416, p416, q416);
    end
    for (int i = 0; i < 65536; i++) begin
      {s816, c816} = 16'(i); #1 check(8, 16, s816, c816, p816, q816);
    end
    if (wraps == 0) failures++;
    $display("inputs needing the +m_i correction: %0d", wraps);
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
