// dim1cs_encode: weighted-binary residue to Dim1 carry-save form.
//
// A residue r in [0, 2^N] of the Fermat modulus 2^N+1 arrives as N+1 bits,
// bit N being set only for r = 2^N. It is rewritten as the Dim1 carry-save
// pair (s, c), whose value is (s+1)+(c+1) mod 2^N+1:
//   s = r[N-1:0]                         (s+1 = r+1, or 1 when r = 2^N)
//   c = all ones except c[0] = ~r[N]     (c+1 = 2^N = -1, or 2^N-1 when r = 2^N)
// so 13 mod 17 becomes s=1101, c=1111 and 16 mod 17 becomes s=0000, c=1110.
// The only gate is one inverter: s is the input wired through and c[N-1:1]
// are constant ones, as the encoding requires. Purely combinational.
//
// This follows the document's input mapping exactly. Inputs above 2^N are not
// residues and are not checked.
module dim1cs_encode #(
  parameter int N = 4                 // exponent n of the modulus 2^n+1
) (
  input  logic [N:0]   r,             // weighted binary residue, 0..2^N
  output logic [N-1:0] s,             // Dim1 carry-save sum vector
  output logic [N-1:0] c              // Dim1 carry-save carry vector
);

  always_comb begin
    s    = r[N-1:0];
    c    = '1;
    c[0] = ~r[N];
  end

endmodule
