// dim1_csa32: modulo 2^N+1 carry-save adder (3:2) for diminished-1 operands.
//
// Three n-bit Dim1 operands x, y, z (pattern d stands for d + 1) are reduced to
// two Dim1 operands s, c with (x+1)+(y+1)+(z+1) = (s+1)+(c+1) mod 2^N+1.
// A row of full adders gives the sum bits and the carries; the carry leaving
// bit N-1 has weight 2^N = -1 mod 2^N+1, so it is fed back inverted into bit 0
// of c (end-around inverted carry). That inversion contributes a constant -1,
// which is exactly what turns three Dim1 offsets into two, so no correction
// term is needed. Purely combinational.
//
// Helper of dim1_csa42, built as the usual modulo 2^n+1 carry-save stage; the
// document names only the 4:2 compressor built from it.
module dim1_csa32 #(
  parameter int N = 4                 // exponent n of the modulus 2^n+1
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,             // Dim1 sum vector
  output logic [N-1:0] c              // Dim1 carry vector, end-around inverted
);

  logic [N-1:0] g;                    // full-adder carries, bit i has weight 2^(i+1)

  always_comb begin
    s = x ^ y ^ z;
    g = (x & y) | (x & z) | (y & z);
    c[0] = ~g[N-1];
    for (int i = 1; i < N; i++) c[i] = g[i-1];
  end

endmodule
