// mrc3_dim1cs: mixed radix conversion for three Fermat moduli in Dim1
// carry-save arithmetic.
//
// Moduli m1 = 2^N1+1, m2 = 2^N2+1, m3 = 2^N3+1 (N1 < N2 < N3). Residue r_i
// enters as a Dim1 carry-save pair (s_i, c_i); the outputs are the mixed
// radix digits of X, a1 + a2*m1 + a3*m1*m2 = X, as binary numbers:
//   a1 = r1
//   a2 = (r2 - a1) * |m1^-1|_m2                          mod m2
//   a3 = ((r3 - a1) * |m1^-1|_m3 - a2) * |m2^-1|_m3      mod m3
// Dataflow (each unit is one instance below):
//   a1: Add/Conv of (s1,c1).
//   a2: Add_Inv(s1,c1 -> mod m2), 4:2 Comp with (c2,s2), Mult_Inv by
//       |m1^-1|_m2, Add/Conv.
//   a3: Add_Inv(s1,c1 -> mod m3), 4:2 Comp with (c3,s3), Mult_Inv by
//       |m1^-1|_m3; Add_Inv of the carry-save a2 (the Mult_Inv output before
//       its Add/Conv) into mod m3; 4:2 Comp of the two; Mult_Inv by
//       |m2^-1|_m3; Add/Conv.
// Everything stays in carry-save form; carries propagate only in the three
// Add/Conv units. The inverse constants are computed at elaboration from the
// exponents. Purely combinational, no clock.
//
// The structure is the document's three-moduli converter; the default
// moduli {3, 5, 17} are the set whose critical path the document works out.
module mrc3_dim1cs
  import fermat_pkg::*;
#(
  parameter int N1 = 1,               // m1 = 2^N1+1
  parameter int N2 = 2,               // m2 = 2^N2+1
  parameter int N3 = 4                // m3 = 2^N3+1
) (
  input  logic [N1-1:0] s1, c1,
  input  logic [N2-1:0] s2, c2,
  input  logic [N3-1:0] s3, c3,
  output logic [N1:0]   a1,
  output logic [N2:0]   a2,
  output logic [N3:0]   a3
);

  localparam longint M1    = fermat_mod(N1);
  localparam longint M2    = fermat_mod(N2);
  localparam longint M3    = fermat_mod(N3);
  localparam longint INV12 = mod_inverse(M1, M2);   // |m1^-1|_m2
  localparam longint INV13 = mod_inverse(M1, M3);   // |m1^-1|_m3
  localparam longint INV23 = mod_inverse(M2, M3);   // |m2^-1|_m3

  if (!(N1 < N2 && N2 < N3)) begin : g_bad_order
    $error("mrc3_dim1cs: exponents must satisfy N1 < N2 < N3");
  end

  // ---- digit 1 -----------------------------------------------------------
  dim1_add_conv #(.N(N1)) u_conv1 (.s(s1), .c(c1), .a(a1));

  // ---- digit 2 -----------------------------------------------------------
  logic [N2-1:0] ninv12_p, ninv12_q;   // -r1 mod m2
  logic [N2-1:0] d2_s, d2_c;           // r2 - r1 mod m2
  logic [N2-1:0] a2cs_s, a2cs_c;       // a2 in carry-save form

  dim1_add_inv  #(.NI(N1), .NJ(N2)) u_ainv12 (.s(s1), .c(c1), .p(ninv12_p), .q(ninv12_q));
  dim1_csa42    #(.N(N2))           u_cmp2   (.a(ninv12_p), .b(ninv12_q), .c(c2), .d(s2),
                                              .s(d2_s), .cy(d2_c));
  dim1_mult_inv #(.N(N2), .K(INV12)) u_minv12 (.s(d2_s), .c(d2_c), .ps(a2cs_s), .pc(a2cs_c));
  dim1_add_conv #(.N(N2))           u_conv2  (.s(a2cs_s), .c(a2cs_c), .a(a2));

  // ---- digit 3 -----------------------------------------------------------
  logic [N3-1:0] ninv13_p, ninv13_q;   // -r1 mod m3
  logic [N3-1:0] d3_s, d3_c;           // r3 - r1 mod m3
  logic [N3-1:0] t3_s, t3_c;           // (r3 - a1) * |m1^-1|_m3
  logic [N3-1:0] ninv23_p, ninv23_q;   // -a2 mod m3
  logic [N3-1:0] e3_s, e3_c;           // t3 - a2
  logic [N3-1:0] a3cs_s, a3cs_c;       // a3 in carry-save form

  dim1_add_inv  #(.NI(N1), .NJ(N3)) u_ainv13 (.s(s1), .c(c1), .p(ninv13_p), .q(ninv13_q));
  dim1_csa42    #(.N(N3))           u_cmp3a  (.a(ninv13_p), .b(ninv13_q), .c(c3), .d(s3),
                                              .s(d3_s), .cy(d3_c));
  dim1_mult_inv #(.N(N3), .K(INV13)) u_minv13 (.s(d3_s), .c(d3_c), .ps(t3_s), .pc(t3_c));
  dim1_add_inv  #(.NI(N2), .NJ(N3)) u_ainv23 (.s(a2cs_s), .c(a2cs_c), .p(ninv23_p), .q(ninv23_q));
  dim1_csa42    #(.N(N3))           u_cmp3b  (.a(ninv23_p), .b(ninv23_q), .c(t3_s), .d(t3_c),
                                              .s(e3_s), .cy(e3_c));
  dim1_mult_inv #(.N(N3), .K(INV23)) u_minv23 (.s(e3_s), .c(e3_c), .ps(a3cs_s), .pc(a3cs_c));
  dim1_add_conv #(.N(N3))           u_conv3  (.s(a3cs_s), .c(a3cs_c), .a(a3));

endmodule
