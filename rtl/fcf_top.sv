// fcf_top: the three feed-forward-cutset-free arithmetic units side by side.
//
//   u_fcf_pa   32-bit two-stage FCF pipelined accumulator (pa_a -> pa_s)
//   u_mfcf_pa  16-bit modified FCF accumulator for 4-bit 2's complement
//              inputs, four 4-bit segments (mpa_a -> mpa_s)
//   u_fcf_mac  8 x 8 unsigned multiply-accumulate into 16 bits (mac_a,
//              mac_b -> mac_s)
//
// The units share only the clock and the synchronous active-high reset; each
// has its own ports and timing (see the unit's own description). Sizes come
// from fcf_pkg. In all of them only the value reached after the inputs have
// been held at zero for a few cycles is the accumulation result; intermediate
// outputs are not.
module fcf_top
  import fcf_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [PA_W-1:0]      pa_a,
  output logic [PA_W-1:0]      pa_s,
  input  logic [MPA_K-1:0]     mpa_a,
  output logic [MPA_N-1:0]     mpa_s,
  input  logic [MAC_AW-1:0]    mac_a,
  input  logic [MAC_AW-1:0]    mac_b,
  output logic [MAC_ACC_W-1:0] mac_s
);

  fcf_pa #(.W(PA_W), .STAGES(PA_STAGES)) u_fcf_pa (
    .clk(clk), .rst(rst), .a(pa_a), .s(pa_s)
  );

  mfcf_pa #(.N(MPA_N), .K(MPA_K), .STAGES(MPA_STAGES)) u_mfcf_pa (
    .clk(clk), .rst(rst), .a(mpa_a), .s(mpa_s)
  );

  fcf_mac #(.AW(MAC_AW), .ACC_W(MAC_ACC_W), .STAGES(MAC_STAGES), .FCF_COLS(MAC_FCF_COLS)) u_fcf_mac (
    .clk(clk), .rst(rst), .a(mac_a), .b(mac_b), .s(mac_s)
  );

endmodule
