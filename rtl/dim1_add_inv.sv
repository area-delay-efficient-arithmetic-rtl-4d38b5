// dim1_add_inv: additive inverse across Fermat moduli (the "Add_Inv" unit).
//
// Input is a Dim1 carry-save pair (s, c) modulo mi = 2^NI+1 standing for the
// residue r = ((s+1)+(c+1)) mod mi. Output is a Dim1 carry-save pair (p, q)
// modulo mj = 2^NJ+1 (NJ > NI) standing for -r mod mj.
//
// The integer x = s + c + 2 lies in [2, 2*mi - 2], so r = x - k*mi with
// k = 1 exactly when s + c + 1 carries out of NI bits. Then
//   -r = -(s+1) - (c+1) + k*mi       (mod mj)
// and, written as Dim1 operands of width NJ:
//   p = {ones, ~s}                   value 2^NJ - s     = -(s+1)
//   q = {~k repeated, ~c}            value -(c+1) when k = 0,
//                                    value 2^NI - c = -(c+1) + mi when k = 1.
// So the correction by the known constant mi costs nothing but the carry k,
// computed by a carry-lookahead of s + c + 1 (depth log2 NI); the rest is
// inverters and wiring. The upper NJ-NI bits of p are constant ones on
// purpose: they are the Dim1 sign extension of the negated operand. Purely
// combinational.
//
// The document gives the function and that a known constant is added; this
// particular split of the correction into the upper bits of q is this design's
// own construction.
module dim1_add_inv #(
  parameter int NI = 1,               // exponent of the source modulus 2^NI+1
  parameter int NJ = 2                // exponent of the target modulus 2^NJ+1
) (
  input  logic [NI-1:0] s,
  input  logic [NI-1:0] c,
  output logic [NJ-1:0] p,
  output logic [NJ-1:0] q
);

  logic [NI-1:0] gen, prop;
  logic          k;                   // 1 when (s+1)+(c+1) >= 2^NI+1

  always_comb begin
    // carry out of s + c + 1 = group generate | group propagate (prefix tree)
    gen  = s & c;
    prop = s ^ c;
    for (int d = 1; d < NI; d = d * 2) begin
      for (int i = NI - 1; i >= d; i--) begin
        gen[i]  = gen[i] | (prop[i] & gen[i-d]);
        prop[i] = prop[i] & prop[i-d];
      end
    end
    k = gen[NI-1] | prop[NI-1];
    p = '1;
    p[NI-1:0] = ~s;
    q = {NJ{~k}};
    q[NI-1:0] = ~c;
  end

  if (NJ <= NI) begin : g_bad_widths
    $error("dim1_add_inv: NJ must exceed NI");
  end

endmodule
