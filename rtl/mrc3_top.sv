// mrc3_top: three-moduli Fermat mixed radix converter with weighted-binary
// residue inputs.
//
// Each residue r_i (0..2^Ni, Ni+1 bits) of the Fermat modulus 2^Ni+1 is turned
// into Dim1 carry-save form by one dim1cs_encode (a single inverter) and the
// three pairs go to mrc3_dim1cs, which returns the mixed radix digits
//   X = a1 + a2*m1 + a3*m1*m2,  0 <= a_i < m_i,
// as binary numbers (a_i is Ni+1 bits wide). Purely combinational; the result
// is valid one combinational delay after the inputs settle.
//
// Defaults are the moduli set {3, 5, 17} (N = 1, 2, 4); the document also
// evaluates {5,17,257}, {5,17,65537}, {5,257,65537} and {17,257,65537}, which
// are obtained by setting N1, N2, N3.
module mrc3_top #(
  parameter int N1 = 1,               // m1 = 2^N1+1
  parameter int N2 = 2,               // m2 = 2^N2+1
  parameter int N3 = 4                // m3 = 2^N3+1
) (
  input  logic [N1:0] r1,             // residue of X mod m1
  input  logic [N2:0] r2,             // residue of X mod m2
  input  logic [N3:0] r3,             // residue of X mod m3
  output logic [N1:0] a1,             // mixed radix digit, weight 1
  output logic [N2:0] a2,             // mixed radix digit, weight m1
  output logic [N3:0] a3              // mixed radix digit, weight m1*m2
);

  logic [N1-1:0] s1, c1;
  logic [N2-1:0] s2, c2;
  logic [N3-1:0] s3, c3;

  dim1cs_encode #(.N(N1)) u_enc1 (.r(r1), .s(s1), .c(c1));
  dim1cs_encode #(.N(N2)) u_enc2 (.r(r2), .s(s2), .c(c2));
  dim1cs_encode #(.N(N3)) u_enc3 (.r(r3), .s(s3), .c(c3));

  mrc3_dim1cs #(.N1(N1), .N2(N2), .N3(N3)) u_mrc (
    .s1(s1), .c1(c1), .s2(s2), .c2(c2), .s3(s3), .c3(c3),
    .a1(a1), .a2(a2), .a3(a3)
  );

endmodule
