// fcf_adder: feed-forward-cutset-free (FCF) pipelined ripple-carry adder.
//
// The W-bit addition x + y is split into STAGES equal ripple-carry segments.
// The carry out of segment j is not passed on in the same cycle: it is stored
// in a single flip-flop and enters segment j+1 in the next clock cycle. So an
// n-stage adder needs only n-1 flip-flops, where a conventional pipeline would
// also have to delay every operand and sum bit crossing the cut.
//
// The sum is therefore not x + y of one cycle; it is only correct "in total":
// when the adder is used inside an accumulation loop, every operand bit and
// every carry is added exactly once, just in a later cycle for the carries, so
// the final accumulation value is exact once the carry flip-flops have emptied
// (feed zero operands for STAGES-1 cycles). The carry out of the top segment is
// dropped (arithmetic modulo 2^W). cin enters segment 0 in the same cycle.
//
// Timing: sum is combinational from x, y, cin and the carry flip-flops; the
// longest path is one segment of W/STAGES bits. Synchronous active-high reset
// clears the carry flip-flops.
module fcf_adder #(
  parameter int unsigned W      = fcf_pkg::PA_W,
  parameter int unsigned STAGES = fcf_pkg::PA_STAGES
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum
);

  localparam int unsigned SEG = W / STAGES;

  if (STAGES < 1 || W % STAGES != 0) begin : g_bad_split
    $error("fcf_adder: W must be a positive multiple of STAGES");
  end

  logic [STAGES-1:0] seg_cin;    // carry entering each segment
  logic [STAGES-1:0] seg_cout;   // carry leaving each segment

  assign seg_cin[0] = cin;

  for (genvar j = 0; j < STAGES; j++) begin : g_seg
    rca #(.W(SEG)) u_rca (
      .a   (x[j*SEG +: SEG]),
      .b   (y[j*SEG +: SEG]),
      .cin (seg_cin[j]),
      .sum (sum[j*SEG +: SEG]),
      .cout(seg_cout[j])
    );
  end

  if (STAGES > 1) begin : g_carry_ff
    // the only flip-flops FCF pipelining inserts: one per segment boundary
    dff_array #(.W(STAGES-1)) u_carry_ff (
      .clk(clk), .rst(rst), .d(seg_cout[STAGES-2:0]), .q(seg_cin[STAGES-1:1])
    );
  end

  // seg_cout[STAGES-1] leaves the W-bit accumulator and is not used.

endmodule
