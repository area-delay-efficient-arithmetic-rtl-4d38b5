// dim1_mult_inv: multiply a Dim1 carry-save residue by a constant modulo
// 2^N+1 (the "Mult_Inv" unit, constant = a modular inverse).
//
// Input (s, c) and output (ps, pc) are Dim1 carry-save pairs modulo
// m = 2^N+1; the output stands for K * ((s+1)+(c+1)) mod m.
//
// How it works (all fixed at elaboration, so only wiring, inverters and
// compressors remain):
//  * K is recoded into radix-4 Booth digits d_j in {-2,-1,0,1,2}, weight 4^j.
//  * A nonzero digit yields two partial products, one from s and one from c:
//    the operand multiplied by 2^(2j) (times 2 more when |d_j| = 2). In Dim1,
//    multiplying by 2 is a left rotation with the wrapped bit inverted, since
//    2^N = -1 mod m; a negative digit inverts all bits (Dim1 negation).
//    Zero digits yield nothing.
//  * The partial products, all Dim1 operands, are reduced by a tree of
//    dim1_csa42 compressors, four operands to two per compressor, until two
//    remain. They are the output; no carry-propagate adder is used.
// Purely combinational; depth is one 4:2 compressor per tree level.
//
// The document gives Booth encoding of the constant, Dim1 carry-save partial
// products and modulo 4:2 compressors with a carry-save output. The recoding
// width, the rotation form of the shifts and the tree shape are this design's.
module dim1_mult_inv
  import fermat_pkg::*;
#(
  parameter int     N = 2,            // exponent n of the modulus 2^n+1
  parameter longint K = 2             // constant multiplier, 1..2^N
) (
  input  logic [N-1:0] s,
  input  logic [N-1:0] c,
  output logic [N-1:0] ps,
  output logic [N-1:0] pc
);

  // K < 2^(N+1), so N+2 bits with a zero sign bit cover it.
  localparam int ND = (N + 3) / 2;    // number of Booth digits

  function automatic int nonzero_below(input int j);
    int cnt = 0;
    for (int i = 0; i < j; i++) if (booth_digit(K, i) != 0) cnt++;
    return cnt;
  endfunction

  localparam int NZ   = nonzero_below(ND);
  localparam int NOPS = 2 * NZ;       // Dim1 partial products

  // Operand count after l levels of 4:2 compression.
  function automatic int ops_at(input int l);
    int cnt = NOPS;
    for (int i = 0; i < l; i++) cnt = (cnt / 4) * 2 + cnt % 4;
    return cnt;
  endfunction

  function automatic int levels();
    int l = 0;
    while (ops_at(l) > 2) l++;
    return l;
  endfunction

  localparam int NLEV = levels();

  // Dim1 multiplication by 2^e: rotate left by e, wrapped bits inverted.
  function automatic logic [N-1:0] dim1_shl(input logic [N-1:0] x, input int e);
    logic [N-1:0] r, t;
    r = x;
    for (int i = 0; i < e; i++) begin
      t[0] = ~r[N-1];
      for (int b = 1; b < N; b++) t[b] = r[b-1];
      r = t;
    end
    return r;
  endfunction

  // Partial product of Dim1 operand x for Booth digit dig of weight 4^j.
  function automatic logic [N-1:0] booth_pp(input logic [N-1:0] x, input int dig, input int j);
    int e;
    logic [N-1:0] r;
    e = (2 * j + ((dig == 2 || dig == -2) ? 1 : 0)) % (2 * N);
    r = dim1_shl(x, e);
    return (dig < 0) ? ~r : r;
  endfunction

  if (K < 1 || K > (longint'(1) << N)) begin : g_bad_k
    $error("dim1_mult_inv: K must lie in 1..2^N");
  end

  for (genvar l = 0; l <= NLEV; l++) begin : g_lvl
    localparam int CNT = ops_at(l);
    logic [N-1:0] v [CNT];
    if (l == 0) begin : g_pp
      for (genvar j = 0; j < ND; j++) begin : g_dig
        localparam int DIG = booth_digit(K, j);
        localparam int R   = nonzero_below(j);
        if (DIG != 0) begin : g_nz
          assign v[2*R]   = booth_pp(s, DIG, j);
          assign v[2*R+1] = booth_pp(c, DIG, j);
        end
      end
    end else begin : g_red
      localparam int PREV = ops_at(l - 1);
      for (genvar g = 0; g < PREV / 4; g++) begin : g_cmp
        dim1_csa42 #(.N(N)) u_cmp (
          .a (g_lvl[l-1].v[4*g]),
          .b (g_lvl[l-1].v[4*g+1]),
          .c (g_lvl[l-1].v[4*g+2]),
          .d (g_lvl[l-1].v[4*g+3]),
          .s (v[2*g]),
          .cy(v[2*g+1])
        );
      end
      if (PREV % 4 != 0) begin : g_pass
        assign v[CNT-2] = g_lvl[l-1].v[PREV-2];
        assign v[CNT-1] = g_lvl[l-1].v[PREV-1];
      end
    end
  end

  assign ps = g_lvl[NLEV].v[0];
  assign pc = g_lvl[NLEV].v[1];

endmodule
