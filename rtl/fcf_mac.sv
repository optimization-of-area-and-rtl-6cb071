// fcf_mac: multiply-accumulate unit with feed-forward-cutset-free pipelining.
//
// Computes S <= S + A * B for unsigned AW-bit operands, modulo 2^ACC_W
// (8 x 8 -> 16 bits by default). Multiplication and accumulation are merged so
// that there is only one carry propagation per cycle:
//
//   input buffer   A and B are registered (A_Reg, B_Reg).
//   stage 1        AND-gate partial products, up to eight rows, each ACC_W bits;
//                  first column-addition level: two rows of 4:2 compressors
//                  reduce the eight rows to four.
//   boundary       the four rows are registered (pipeline stage), except in the
//                  FCF_COLS least significant columns: those bits cross the
//                  boundary without flip-flops (feed-forward-cutset-free area).
//   stage 2        second level: one row of 4:2 compressors, four rows to two;
//                  a 3:2 row adds the fed-back S; an FCF adder (STAGES ripple-
//                  carry segments, one carry flip-flop per segment boundary)
//                  produces the next S, stored in the output buffer.
//
// Because the low columns skip the boundary register and the FCF adder delays
// its inter-segment carries, the bits of one product reach S in different
// cycles. Every bit is still added exactly once, so the final sum is exact,
// but intermediate values of S are not running sums.
//
// Timing: with the last operand pair in A_Reg/B_Reg at cycle c and zero
// operands after it, S holds the exact sum from cycle c + STAGES + 1 on.
// rst (synchronous, active high) clears all registers and the accumulator.
// Operand widths, unsigned operands, the stage split and FCF_COLS are choices
// of this design; AW may be 1 to 8 (the tree is built for eight rows).
module fcf_mac #(
  parameter int unsigned AW       = fcf_pkg::MAC_AW,
  parameter int unsigned ACC_W    = fcf_pkg::MAC_ACC_W,
  parameter int unsigned STAGES   = fcf_pkg::MAC_STAGES,
  parameter int unsigned FCF_COLS = fcf_pkg::MAC_FCF_COLS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    a,
  input  logic [AW-1:0]    b,
  output logic [ACC_W-1:0] s
);

  localparam int unsigned ROWS = 8;
  localparam int unsigned HI_W = ACC_W - FCF_COLS;   // registered columns

  if (AW < 1 || AW > ROWS || AW > ACC_W || FCF_COLS >= ACC_W) begin : g_bad_size
    $error("fcf_mac: needs 1 <= AW <= 8 and FCF_COLS < ACC_W");
  end

  logic [AW-1:0]    a_reg, b_reg;
  logic [ACC_W-1:0] pp [ROWS];
  logic [ACC_W-1:0] l1 [4];      // rows after the first compressor level
  logic [ACC_W-1:0] l1_q [4];    // the same rows after the pipeline boundary
  logic [ACC_W-1:0] u, v, x, y, s_next;

  dff_array #(.W(AW)) u_a_buffer (.clk(clk), .rst(rst), .d(a), .q(a_reg));
  dff_array #(.W(AW)) u_b_buffer (.clk(clk), .rst(rst), .d(b), .q(b_reg));

  // ---- stage 1: partial products and first 4:2 level ----
  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      pp[i] = '0;
      if (i < AW) pp[i] = ACC_W'({{ACC_W{1'b0}}, a_reg & {AW{b_reg[i]}}} << i);
    end
  end

  compressor_row #(.W(ACC_W)) u_cmp_l1a (
    .r0(pp[0]), .r1(pp[1]), .r2(pp[2]), .r3(pp[3]), .s(l1[0]), .c(l1[1])
  );
  compressor_row #(.W(ACC_W)) u_cmp_l1b (
    .r0(pp[4]), .r1(pp[5]), .r2(pp[6]), .r3(pp[7]), .s(l1[2]), .c(l1[3])
  );

  // ---- pipeline boundary: flip-flops only above the FCF columns ----
  logic [4*HI_W-1:0] hi_d, hi_q;

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      hi_d[r*HI_W +: HI_W] = l1[r][ACC_W-1:FCF_COLS];
    end
  end

  dff_array #(.W(4*HI_W)) u_pipeline_stage (.clk(clk), .rst(rst), .d(hi_d), .q(hi_q));

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      l1_q[r] = {hi_q[r*HI_W +: HI_W], l1[r][FCF_COLS-1:0]};
    end
  end

  // ---- stage 2: second 4:2 level, accumulator merge, FCF final adder ----
  compressor_row #(.W(ACC_W)) u_cmp_l2 (
    .r0(l1_q[0]), .r1(l1_q[1]), .r2(l1_q[2]), .r3(l1_q[3]), .s(u), .c(v)
  );

  csa_row #(.W(ACC_W)) u_acc_merge (.u(u), .v(v), .w(s), .x(x), .y(y));

  fcf_adder #(.W(ACC_W), .STAGES(STAGES)) u_final_adder (
    .clk(clk), .rst(rst), .x(x), .y(y), .cin(1'b0), .sum(s_next)
  );

  dff_array #(.W(ACC_W)) u_output_buffer (.clk(clk), .rst(rst), .d(s_next), .q(s));

endmodule
