// csa_row: carry-save (3:2) row that reduces three W-bit rows to two.
//
// One XOR/MUX full adder per column: x gets the column sums, y the carries
// moved up one bit, so that x + y = u + v + w (mod 2^W); the carry out of bit
// W-1 is dropped. In the MAC it merges the fed-back accumulator value into the
// two rows coming out of the compressor tree, so that multiplication and
// accumulation share one carry-propagate adder. Purely combinational.
module csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] u,
  input  logic [W-1:0] v,
  input  logic [W-1:0] w,
  output logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic [W-1:0] cy;

  for (genvar i = 0; i < W; i++) begin : g_col
    xor_mux_fa u_fa (.a(u[i]), .b(v[i]), .cin(w[i]), .sum(x[i]), .cout(cy[i]));
  end

  // cy[W-1] has weight 2^W and is not used (modulo 2^W)
  always_comb y = {cy[W-2:0], 1'b0};

endmodule
