// half_adder: one-bit half adder, sum = a ^ b and carry = a & b.
//
// Used where a column of the carry-save tree has only two bits left to add
// (column 0 of a 4:2 compressor row, whose horizontal carry-in is always 0).
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
