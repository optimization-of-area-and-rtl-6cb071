// xor_mux_fa: one-bit full adder built from two XORs and a 2:1 multiplexer.
//
// The sum is the cascade (a ^ b) ^ cin. The carry comes from a multiplexer
// whose select is the propagate signal p = a ^ b: when p = 0 both addends are
// equal and the carry is a, when p = 1 exactly one addend is set and the carry
// is cin. This is the full adder the whole design is built from (every ripple
// carry adder, compressor and carry-save row). Purely combinational.
module xor_mux_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = p ? cin : a;
  end

endmodule
