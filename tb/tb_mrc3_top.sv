// tb_mrc3_top: end-to-end test of the converter at its default moduli
// {3,5,17}, no parameter overrides. Every X in 0..254 is applied as its three
// binary residues; the digits must be X mod 3, (X/3) mod 5 and X/15.
// It also counts how often each special case of the design occurred and
// fails if one never did:
//   - the residue 2^n input (the only input with bit n set),
//   - the +m_i correction of the Add_Inv units fed by residue 1 (the integer
//     (s1+1)+(c1+1) of its carry-save pair reaches m1; worked out here from
//     the input encoding, s = low n bits of r, c = ones with bit 0 = ~r[n]),
//   - a zero result and a 2^n result out of the Add/Conv units.
module tb_mrc3_top;
  int checks = 0, failures = 0;
  int top_inputs = 0, corr1 = 0, zero_digits = 0, top_digits = 0;

  logic [1:0] r1, a1;
  logic [2:0] r2, a2;
  logic [4:0] r3, a3;

  mrc3_top dut (.r1(r1), .r2(r2), .r3(r3), .a1(a1), .a2(a2), .a3(a3));

  initial begin
    for (int x = 0; x < 255; x++) begin
      r1 = 2'(x % 3);
      r2 = 3'(x % 5);
      r3 = 5'(x % 17);
      #1;
      checks++;
      if (a1 != 2'(x % 3) || a2 != 3'((x / 3) % 5) || a3 != 5'(x / 15)) begin
        failures++;
        $display("FAIL X=%0d got %0d,%0d,%0d", x, a1, a2, a3);
      end
      if (r1 == 2 || r2 == 4 || r3 == 16) top_inputs++;
      // n1 = 1: s1 = r1[0], c1 = ~r1[1]
      if (int'(r1[0]) + int'(!r1[1]) + 2 >= 3) corr1++;
      if (a1 == 0 || a2 == 0 || a3 == 0) zero_digits++;
      if (a1 == 2 || a2 == 4 || a3 == 16) top_digits++;
    end
    $display("2^n inputs %0d, Add_Inv corrections %0d, zero digits %0d, 2^n digits %0d",
             top_inputs, corr1, zero_digits, top_digits);
    if (top_inputs == 0) failures++;
    if (corr1 == 0) failures++;
    if (zero_digits == 0 || top_digits == 0) failures++;
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
