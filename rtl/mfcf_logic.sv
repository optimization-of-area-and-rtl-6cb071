// mfcf_logic: carry/sign-extension fix of the modified FCF accumulator.
//
// In an FCF accumulator fed with 2's complement numbers, a negative input
// adds a sign extension of all ones to the upper segments, and the lower
// segment later delivers a carry of one; the two cancel in the final sum, but
// on the way the upper bits flip to ones and back, wasting power. This logic
// looks at both contributions for the upper part together:
//   sign carry | a_fix carry_fix
//    0    0    |   0      0        nothing to add
//    0    1    |   0      1        +1: pass the carry on
//    1    0    |   1      0        -1: sign-extend with ones
//    1    1    |   0      0        -1 + 1 = 0: add nothing
// so a_fix = sign & ~carry and carry_fix = ~sign & carry. a_fix replaces the
// sign bit as the sign extension for all upper bits; carry_fix replaces the
// carry into the upper segment. Purely combinational.
module mfcf_logic (
  input  logic sign,
  input  logic carry,
  output logic a_fix,
  output logic carry_fix
);

  always_comb begin
    a_fix     = sign & ~carry;
    carry_fix = ~sign & carry;
  end

endmodule
