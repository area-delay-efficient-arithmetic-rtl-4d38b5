// dim1_csa42: modulo 2^N+1 4:2 compressor for diminished-1 operands
// (the "4:2 Comp" unit of the converter).
//
// Four n-bit Dim1 operands a, b, c, d are reduced to a Dim1 carry-save pair
// (s, cy) holding the same sum modulo 2^N+1:
//   (a+1)+(b+1)+(c+1)+(d+1) = (s+1)+(cy+1)  mod 2^N+1.
// It is two dim1_csa32 stages, each with its end-around inverted carry, so the
// delay is two full-adder levels and no carry propagates. In the converter the
// operands are a residue's carry-save pair and the carry-save pair of another
// residue's additive inverse, so the output is the carry-save form of their
// difference. Purely combinational.
//
// The document gives the function, its delay (two full-adder levels) and its
// source; the two-stage build is this design's choice.
module dim1_csa42 #(
  parameter int N = 4                 // exponent n of the modulus 2^n+1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  output logic [N-1:0] s,             // Dim1 sum vector
  output logic [N-1:0] cy             // Dim1 carry vector
);

  logic [N-1:0] s1, c1;

  dim1_csa32 #(.N(N)) u_stage1 (.x(a),  .y(b),  .z(c), .s(s1), .c(c1));
  dim1_csa32 #(.N(N)) u_stage2 (.x(s1), .y(c1), .z(d), .s(s),  .c(cy));

endmodule
