// compressor_4_2: 4:2 compressor for one column of a carry-save tree.
//
// Adds four bits of one column (x1..x4) and a horizontal carry cin from the
// next lower column:  x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
// It is the usual pair of full adders: the first adds x1, x2, x3 and gives cout
// (sent horizontally to the next column), the second adds the first sum, x4 and
// cin and gives sum and carry. Because cout does not depend on cin, a row of
// these compressors has no rippling carry chain. Both full adders are the
// XOR/MUX type. Purely combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s1;

  xor_mux_fa u_fa1 (.a(x1), .b(x2), .cin(x3),  .sum(s1),  .cout(cout));
  xor_mux_fa u_fa2 (.a(s1), .b(x4), .cin(cin), .sum(sum), .cout(carry));

endmodule
