// mfcf_pa: modified feed-forward-cutset-free pipelined accumulator (MFCF-PA).
//
// Accumulates a stream of K-bit 2's complement numbers into an N-bit sum,
// S <= S + sign_extend(A). The adder is split into STAGES ripple-carry
// segments: the lowest one, RCA[K-1:0], adds the input to S[K-1:0]; the upper
// STAGES-1 segments form an FCF adder (fcf_adder) over S[N-1:K] with one carry
// flip-flop between neighbours. Default: K = 4, N = 16, four 4-bit segments.
//
// In a plain FCF accumulator the sign extension of a negative input (all ones)
// reaches the upper segments one cycle before the carry of the lower segment
// that cancels it, so the upper bits of S toggle to ones and back. Here the
// MFCF logic (mfcf_logic) merges the two: the carry out of RCA[K-1:0] is
// stored in a flip-flop, and in the next cycle it is combined with the sign bit
// of the input then in A_Reg. When both are one they cancel and nothing is
// added to the upper part; otherwise a_fix is used as the sign-extension bit of
// every upper bit and carry_fix, stored in a second flip-flop, becomes the
// carry into the lowest upper segment one cycle later. Each sign bit and each
// carry still enters the sum exactly once, so the final value is exact.
//
// Timing: A is captured into A_Reg at a clock edge and its low bits appear in S
// at the next edge. With the last value in A_Reg at cycle c and zeros fed after
// it, S holds the exact sum (modulo 2^N) from cycle c + STAGES + 1 on: one
// cycle more than the FCF-PA, because of the two flip-flops in the MFCF path.
// rst (synchronous, active high) clears all registers. (N - K) must be a
// multiple of (STAGES - 1) and STAGES must be at least 2.
module mfcf_pa #(
  parameter int unsigned N      = fcf_pkg::MPA_N,
  parameter int unsigned K      = fcf_pkg::MPA_K,
  parameter int unsigned STAGES = fcf_pkg::MPA_STAGES
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [K-1:0] a,
  output logic [N-1:0] s
);

  localparam int unsigned UW = N - K;   // width of the upper segments together

  if (STAGES < 2 || K >= N) begin : g_bad_size
    $error("mfcf_pa: needs STAGES >= 2 and K < N");
  end

  logic [K-1:0]  a_reg;
  logic [K-1:0]  low_sum;
  logic          low_cout;
  logic          carry_q;
  logic          a_fix;
  logic          carry_fix;
  logic          carry_fix_q;
  logic [UW-1:0] up_sum;

  dff_array #(.W(K)) u_input_buffer (.clk(clk), .rst(rst), .d(a), .q(a_reg));

  // lowest segment, RCA[K-1:0]
  rca #(.W(K)) u_rca_low (
    .a(a_reg), .b(s[K-1:0]), .cin(1'b0), .sum(low_sum), .cout(low_cout)
  );

  dff_array #(.W(1)) u_carry_ff (.clk(clk), .rst(rst), .d(low_cout), .q(carry_q));

  mfcf_logic u_mfcf (
    .sign(a_reg[K-1]), .carry(carry_q), .a_fix(a_fix), .carry_fix(carry_fix)
  );

  dff_array #(.W(1)) u_carry_fix_ff (.clk(clk), .rst(rst), .d(carry_fix), .q(carry_fix_q));

  // upper segments: a_fix is the sign extension of every upper bit
  fcf_adder #(.W(UW), .STAGES(STAGES-1)) u_upper (
    .clk(clk), .rst(rst),
    .x({UW{a_fix}}), .y(s[N-1:K]), .cin(carry_fix_q), .sum(up_sum)
  );

  dff_array #(.W(N)) u_output_buffer (
    .clk(clk), .rst(rst), .d({up_sum, low_sum}), .q(s)
  );

endmodule
