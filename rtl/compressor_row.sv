// compressor_row: one column-addition stage that reduces four W-bit rows to two.
//
// A row of W 4:2 compressors, one per column. Column i takes bit i of the four
// rows and the horizontal carry from column i-1; its sum is bit i of s, and its
// carry goes to bit i+1 of c. Column 0 has no horizontal carry-in, so it uses a
// full adder followed by a half adder. The result satisfies
//   s + c = r0 + r1 + r2 + r3   (mod 2^W),
// carries out of bit W-1 being dropped. c is returned already aligned to its
// weight (c[0] = 0). Purely combinational, no carry propagation along the row.
module compressor_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] r0,
  input  logic [W-1:0] r1,
  input  logic [W-1:0] r2,
  input  logic [W-1:0] r3,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-1:0] hcarry;   // horizontal carry out of each column
  logic [W-1:0] vcarry;   // carry of each column, weight of the next column

  // column 0: full adder + half adder (the compressor with cin = 0)
  logic s1_0;
  xor_mux_fa u_fa0 (.a(r0[0]), .b(r1[0]), .cin(r2[0]), .sum(s1_0), .cout(hcarry[0]));
  half_adder u_ha0 (.a(s1_0), .b(r3[0]), .sum(s[0]), .carry(vcarry[0]));

  for (genvar i = 1; i < W; i++) begin : g_col
    compressor_4_2 u_cmp (
      .x1(r0[i]), .x2(r1[i]), .x3(r2[i]), .x4(r3[i]), .cin(hcarry[i-1]),
      .sum(s[i]), .carry(vcarry[i]), .cout(hcarry[i])
    );
  end

  // both carries of column i have the weight of column i+1
  always_comb c = {vcarry[W-2:0], 1'b0};

  // hcarry[W-1] and vcarry[W-1] leave the W-bit window and are not used
  // (arithmetic modulo 2^W).

endmodule
