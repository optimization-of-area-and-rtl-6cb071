// fcf_pkg: default sizes shared by the feed-forward-cutset-free (FCF) accumulators
// and the FCF multiply-accumulate unit.
//
// The accumulator sizes are the ones of the published design: a two-stage 32-bit
// FCF pipelined accumulator (two 16-bit ripple-carry segments), and a modified
// FCF accumulator with 4-bit 2's complement inputs, a 16-bit sum and four 4-bit
// segments. The MAC operand and accumulator widths (8 x 8 -> 16) and the number
// of low columns left without boundary flip-flops are choices of this design.
package fcf_pkg;

  // FCF pipelined accumulator (FCF-PA)
  localparam int unsigned PA_W      = 32;
  localparam int unsigned PA_STAGES = 2;

  // Modified FCF pipelined accumulator (MFCF-PA)
  localparam int unsigned MPA_N      = 16;
  localparam int unsigned MPA_K      = 4;
  localparam int unsigned MPA_STAGES = 4;

  // FCF multiply-accumulate unit (FCF-MAC)
  localparam int unsigned MAC_AW       = 8;
  localparam int unsigned MAC_ACC_W    = 16;
  localparam int unsigned MAC_STAGES   = 2;
  localparam int unsigned MAC_FCF_COLS = 4;

endpackage
