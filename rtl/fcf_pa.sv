// fcf_pa: feed-forward-cutset-free pipelined accumulator (FCF-PA).
//
// Accumulates one W-bit value per clock: S <= S + A. The datapath is the
// two-stage 32-bit accumulator of the FCF scheme: an input buffer A_Reg, an
// adder split into STAGES ripple-carry segments (two 16-bit segments by
// default) with one carry flip-flop between neighbouring segments
// (fcf_adder), and the output buffer S that feeds back into the adder.
//
// Unlike a conventionally pipelined accumulator, which delays the upper half
// of A_Reg and the lower half of S by a full register array so that S is a
// correct running sum, only the inter-segment carry is registered here. The
// intermediate values of S are therefore not running sums; only the final one
// is. The upper segment receives the lower segment's carry one cycle after the
// operand bits it belongs to, which does not change the total.
//
// Timing: A is captured into A_Reg at a clock edge, and its contribution
// appears in S at the next edge. After the last value has reached A_Reg at
// cycle c, the input must be held at zero; S holds the exact sum (modulo 2^W)
// from cycle c + STAGES on, the same latency as a conventional STAGES-stage
// pipelined accumulator. rst (synchronous, active high) clears A_Reg, S and the
// carry flip-flops and so starts a new accumulation.
module fcf_pa #(
  parameter int unsigned W      = fcf_pkg::PA_W,
  parameter int unsigned STAGES = fcf_pkg::PA_STAGES
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  output logic [W-1:0] s
);

  logic [W-1:0] a_reg;
  logic [W-1:0] s_next;

  dff_array #(.W(W)) u_input_buffer (.clk(clk), .rst(rst), .d(a), .q(a_reg));

  fcf_adder #(.W(W), .STAGES(STAGES)) u_adder (
    .clk(clk), .rst(rst), .x(a_reg), .y(s), .cin(1'b0), .sum(s_next)
  );

  dff_array #(.W(W)) u_output_buffer (.clk(clk), .rst(rst), .d(s_next), .q(s));

endmodule
