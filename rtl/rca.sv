// rca: W-bit ripple-carry adder made of XOR/MUX full adders.
//
// sum + 2^W * cout = a + b + cin. The carry ripples from bit 0 to bit W-1
// through the multiplexer of each full adder. Purely combinational; the
// segments of the FCF accumulators and of the MAC's final adder are rca
// instances.
module rca #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    xor_mux_fa u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[W];

endmodule
