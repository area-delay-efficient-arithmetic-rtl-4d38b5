// dim1_add_conv: carry-propagate stage of the converter (the "Add/Conv" unit).
//
// Input is a Dim1 carry-save pair (s, c) modulo 2^N+1, value (s+1)+(c+1).
// Output a is that value as an ordinary binary residue in [0, 2^N], N+1 bits:
// one mixed radix digit.
//
// Two steps, both combinational:
//  1. Parallel-prefix modulo 2^N+1 Dim1 adder. Generate/propagate signals of
//     s and c are combined in a Kogge-Stone prefix tree. The carry out of bit
//     N-1 is fed back inverted as the carry into bit 0, which the prefix groups
//     absorb without a second pass: carry into bit i = G[i-1:0] | P[i-1:0]&~Cout.
//     The Dim1 sum is d = s + c + ~Cout mod 2^N. When every bit propagates
//     (s + c = 2^N - 1) the true value is zero, which this flags.
//  2. Conversion to ordinary binary: a = 0 for the zero flag, else d + 1.
//
// The document specifies a parallel-prefix modulo 2^n+1 adder followed by a
// conversion; the Kogge-Stone tree and the incrementer written as an addition
// are this design's choices.
module dim1_add_conv #(
  parameter int N = 4                 // exponent n of the modulus 2^n+1
) (
  input  logic [N-1:0] s,             // Dim1 carry-save sum vector
  input  logic [N-1:0] c,             // Dim1 carry-save carry vector
  output logic [N:0]   a              // binary residue 0..2^N
);

  logic [N-1:0] gen, prop;            // group generate/propagate of bits [i:0]
  logic [N-1:0] d;                    // Dim1 sum
  logic         cin;                  // end-around inverted carry
  logic         is_zero;

  always_comb begin
    gen  = s & c;
    prop = s ^ c;
    // Kogge-Stone prefix: after the level with span k, bit i holds group [i:i-2k+1].
    // Bits are visited from the top so bit i-k still holds the previous level.
    for (int k = 1; k < N; k = k * 2) begin
      for (int i = N - 1; i >= k; i--) begin
        gen[i]  = gen[i] | (prop[i] & gen[i-k]);
        prop[i] = prop[i] & prop[i-k];
      end
    end
    cin     = ~gen[N-1];
    is_zero = prop[N-1];
    d[0]    = s[0] ^ c[0] ^ cin;
    for (int i = 1; i < N; i++)
      d[i] = s[i] ^ c[i] ^ (gen[i-1] | (prop[i-1] & cin));
    a = is_zero ? '0 : {1'b0, d} + (N+1)'(1);
  end

endmodule
