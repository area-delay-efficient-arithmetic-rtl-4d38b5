// fermat_pkg: elaboration-time helpers shared by the Fermat-moduli mixed radix
// converter.
//
// A Fermat modulus here is m = 2^n + 1. Every residue inside the converter is
// held in diminished-1 (Dim1) carry-save form: a pair of n-bit vectors (s, c),
// each read as a Dim1 number (pattern d stands for the value d + 1), so the pair
// stands for (s + 1) + (c + 1) mod m. Every n-bit pattern is a legal operand,
// which is why no zero detection is needed between stages.
//
// The functions below are evaluated only at elaboration: the modulus of an
// exponent, a modular inverse (the constants the Mult_Inv units multiply by)
// and the radix-4 Booth digits of such a constant.
package fermat_pkg;

  // Fermat modulus 2^n + 1 for an exponent n (n <= 30 here).
  function automatic longint fermat_mod(input int n);
    return (longint'(1) << n) + 1;
  endfunction

  // Multiplicative inverse of a modulo m (a and m coprime), by the extended
  // Euclidean algorithm. Returns a value in [1, m-1].
  function automatic longint mod_inverse(input longint a, input longint m);
    longint r0, r1, t0, t1, q, tmp;
    r0 = m;
    r1 = a % m;
    t0 = 0;
    t1 = 1;
    while (r1 != 0) begin
      q   = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = t0 - q * t1; t0 = t1; t1 = tmp;
    end
    if (t0 < 0) t0 = t0 + m;
    return t0;
  endfunction

  // Radix-4 Booth digit j (in -2..2) of the non-negative constant k:
  // digit_j = -2*k[2j+1] + k[2j] + k[2j-1], with k[-1] = 0.
  function automatic int booth_digit(input longint k, input int j);
    int b_hi, b_mid, b_lo;
    b_hi  = int'((k >> (2 * j + 1)) & 1);
    b_mid = int'((k >> (2 * j)) & 1);
    b_lo  = (j == 0) ? 0 : int'((k >> (2 * j - 1)) & 1);
    return -2 * b_hi + b_mid + b_lo;
  endfunction

endpackage
