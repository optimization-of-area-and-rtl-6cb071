// tb_mfcf_pa: modified FCF accumulator for 2's complement inputs.
//  1. The small example (4-bit inputs, 8-bit sum, 2 segments): 0111 then
//     1100 (+7, -4) must end at 0000_0011, STAGES+1 cycles after the last
//     input reached A_Reg.
//  2. Default size (4-bit inputs, 16-bit sum, four segments): random signed
//     runs, final value = sum of the sign-extended inputs modulo 2^16 at
//     STAGES+1 cycles after the last input, and holding.
//  3. Power motive: on a long run of random inputs of both signs the upper
//     bits S[15:4] must toggle less than in a plain FCF accumulator of the
//     same size fed with the sign-extended inputs.
module tb_mfcf_pa;
  logic clk = 1'b0, rst;
  logic [3:0]  a_small, a;
  logic [7:0]  s_small;
  logic [15:0] s, s_plain, ref_sum;
  int checks = 0, failures = 0;

  mfcf_pa #(.N(8), .K(4), .STAGES(2)) dut_small (.clk(clk), .rst(rst), .a(a_small), .s(s_small));
  mfcf_pa dut (.clk(clk), .rst(rst), .a(a), .s(s));
  // plain FCF accumulator of the same size, for the toggle comparison only
  fcf_pa #(.W(16), .STAGES(4)) plain (.clk(clk), .rst(rst), .a({{12{a[3]}}, a}), .s(s_plain));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect16(logic [15:0] got, logic [15:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  int tog_mfcf, tog_plain;
  logic [15:0] prev_m, prev_p;

  initial begin
    rst = 1'b1; a = '0; a_small = '0;
    @(posedge clk); #1;
    rst = 1'b0;

    // 1. small example
    a_small = 4'b0111; @(posedge clk); #1;
    a_small = 4'b1100; @(posedge clk); #1;
    a_small = 4'b0000;
    repeat (2) @(posedge clk);
    
    @(posedge clk); #1;
    expect16(16'(s_small), 16'h0003, "small example final value 0000_0011");
    repeat (2) @(posedge clk); #1;
    expect16(16'(s_small), 16'h0003, "small example holds");

    // 2. random signed runs at the default size
    for (int run = 0; run < 40; run++) begin
      rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
      ref_sum = '0;
      for (int i = 0; i < 1 + (run % 30); i++) begin
        a = (run % 5 == 0) ? 4'b1000 : 4'($urandom);
        ref_sum += {{12{a[3]}}, a};
        @(posedge clk); #1;
      end
      a = '0;
      repeat (4 + 1) @(posedge clk);
      #1 expect16(s, ref_sum, $sformatf("run %0d final value at STAGES+1 cycles", run));
      repeat (3) @(posedge clk);
      #1 expect16(s, ref_sum, $sformatf("run %0d final value holds", run));
      expect16(s_plain, ref_sum, $sformatf("run %0d plain FCF reference", run));
    end

    // 3. toggle count on the upper bits, 1000 inputs of both signs
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    tog_mfcf = 0; tog_plain = 0; prev_m = s; prev_p = s_plain; ref_sum = '0;
    for (int i = 0; i < 1000 + 8; i++) begin
      a = (i < 1000) ? 4'($urandom) : 4'b0000;
      if (i < 1000) ref_sum += {{12{a[3]}}, a};
      @(posedge clk); #1;
      tog_mfcf  += $countones(s[15:4] ^ prev_m[15:4]);
      tog_plain += $countones(s_plain[15:4] ^ prev_p[15:4]);
      prev_m = s; prev_p = s_plain;
    end
    expect16(s, ref_sum, "mixed-sign run final value");
    checks++;
    if (!(tog_mfcf < tog_plain)) begin
      failures++;
      $display("FAIL upper-bit toggles: MFCF %0d, plain FCF %0d", tog_mfcf, tog_plain);
    end
    $display("upper-bit toggles over 1000 mixed-sign inputs: MFCF %0d, plain FCF %0d", tog_mfcf, tog_plain);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
