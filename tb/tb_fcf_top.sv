// tb_fcf_top: end-to-end test of the top level at its default sizes.
// The three units run at the same time, each on its own random workload of
// several accumulation jobs separated by a reset:
//   FCF-PA   32-bit values,               final value 2 cycles after the last input
//   MFCF-PA  4-bit signed values,          final value 5 cycles after the last input
//   FCF-MAC  8-bit unsigned operand pairs, final value 3 cycles after the last pair
// Besides the final values, it counts how often each mechanism of the design
// occurred, and counts a failure for any that never did:
//   a carry held in an FCF carry flip-flop (FCF-PA and MAC final adder),
//   an intermediate FCF-PA output that is not the running sum,
//   the three MFCF cases: sign extension kept (a_fix), carry passed on
//   (carry_fix), and sign extension and carry cancelled,
//   a product bit crossing the MAC pipeline boundary without a flip-flop.
module tb_fcf_top;
  logic clk = 1'b0, rst;
  logic [31:0] pa_a, pa_s, pa_ref, pa_run;
  logic [3:0]  mpa_a;
  logic [15:0] mpa_s, mpa_ref;
  logic [7:0]  mac_a, mac_b;
  logic [15:0] mac_s, mac_ref;
  int checks = 0, failures = 0;
  int n_pa_carry = 0, n_pa_invalid = 0, n_mac_carry = 0, n_mac_fcf_bits = 0;
  int n_afix = 0, n_cfix = 0, n_cancel = 0;

  fcf_top dut (
    .clk(clk), .rst(rst),
    .pa_a(pa_a), .pa_s(pa_s),
    .mpa_a(mpa_a), .mpa_s(mpa_s),
    .mac_a(mac_a), .mac_b(mac_b), .mac_s(mac_s)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled just before each clock edge
  always @(negedge clk) if (!rst) begin
    if (dut.u_fcf_pa.u_adder.g_carry_ff.u_carry_ff.q != 0) n_pa_carry++;
    if (dut.u_fcf_mac.u_final_adder.g_carry_ff.u_carry_ff.q != 0) n_mac_carry++;
    if (dut.u_mfcf_pa.a_fix) n_afix++;
    if (dut.u_mfcf_pa.carry_fix) n_cfix++;
    if (dut.u_mfcf_pa.a_reg[3] && dut.u_mfcf_pa.carry_q) n_cancel++;
    for (int r = 0; r < 4; r++)
      if (dut.u_fcf_mac.l1[r][3:0] != 0) n_mac_fcf_bits++;
  end

  task automatic expect_eq(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic expect_count(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
    $display("%-45s %0d", what, n);
  endtask

  initial begin
    rst = 1'b1; pa_a = '0; mpa_a = '0; mac_a = '0; mac_b = '0;
    @(posedge clk); #1;

    for (int job = 0; job < 30; job++) begin
      rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
      pa_ref = '0; mpa_ref = '0; mac_ref = '0;
      for (int i = 0; i < 5 + (job * 7) % 41; i++) begin
        pa_a  = $urandom;
        mpa_a = 4'($urandom);
        mac_a = 8'($urandom);
        mac_b = 8'($urandom);
        pa_ref  += pa_a;
        mpa_ref += {{12{mpa_a[3]}}, mpa_a};
        mac_ref += 16'(mac_a) * 16'(mac_b);
        @(posedge clk); #1;
        // S now holds every input before the newest one, but with some
        // carries still in flight it is generally not their exact sum
        pa_run = pa_ref - pa_a;
        if (i > 0 && pa_s != pa_run) n_pa_invalid++;
      end
      pa_a = '0; mpa_a = '0; mac_a = '0; mac_b = '0;
      repeat (2) @(posedge clk);
      #1 expect_eq(pa_s, pa_ref, $sformatf("job %0d FCF-PA final", job));
      @(posedge clk);
      #1 expect_eq(32'(mac_s), 32'(mac_ref), $sformatf("job %0d FCF-MAC final", job));
      repeat (2) @(posedge clk);
      #1 expect_eq(32'(mpa_s), 32'(mpa_ref), $sformatf("job %0d MFCF-PA final", job));
      repeat (2) @(posedge clk);
      #1;
      expect_eq(pa_s, pa_ref, $sformatf("job %0d FCF-PA holds", job));
      expect_eq(32'(mac_s), 32'(mac_ref), $sformatf("job %0d FCF-MAC holds", job));
      expect_eq(32'(mpa_s), 32'(mpa_ref), $sformatf("job %0d MFCF-PA holds", job));
    end

    expect_count(n_pa_carry,     "FCF-PA carry held in carry flip-flop");
    expect_count(n_pa_invalid,   "FCF-PA intermediate output not a running sum");
    expect_count(n_afix,         "MFCF sign extension applied (a_fix)");
    expect_count(n_cfix,         "MFCF carry passed on (carry_fix)");
    expect_count(n_cancel,       "MFCF sign extension and carry cancelled");
    expect_count(n_mac_carry,    "MAC final adder carry held in flip-flop");
    expect_count(n_mac_fcf_bits, "MAC bits crossing boundary without flip-flop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
