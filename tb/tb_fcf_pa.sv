// tb_fcf_pa: 32-bit two-stage FCF pipelined accumulator at its default size.
//  1. The worked example of the FCF scheme, cycle by cycle: inputs 7325AB2C,
//     4823F135, 2823F432, then zeros; S must go 0, 7325AB2C, BB489C61
//     (carry held back), E36C9093, E36D9093 (final, equal to the exact sum).
//  2. Random runs: the final value must equal the sum of the inputs modulo
//     2^32 exactly STAGES cycles after the last input reached A_Reg (the same
//     latency as a conventional two-stage pipelined accumulator), and stay.
module tb_fcf_pa;
  localparam int W = 32, STAGES = 2;
  logic clk = 1'b0, rst;
  logic [W-1:0] a, s, ref_sum;
  int checks = 0, failures = 0;

  fcf_pa dut (.clk(clk), .rst(rst), .a(a), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_s(logic [W-1:0] want, string what);
    checks++;
    if (s !== want) begin
      failures++;
      $display("FAIL %s: S=%h want %h", what, s, want);
    end
  endtask

  logic [W-1:0] ex_in [5] = '{32'h7325_AB2C, 32'h4823_F135, 32'h2823_F432, 32'h0, 32'h0};
  logic [W-1:0] ex_s  [5] = '{32'h0000_0000, 32'h7325_AB2C, 32'hBB48_9C61, 32'hE36C_9093, 32'hE36D_9093};

  initial begin
    rst = 1'b1; a = '0;
    @(posedge clk); #1;
    rst = 1'b0;

    // 1. worked example; cycle n is the cycle after the n-th clock edge
    for (int n = 0; n < 5; n++) begin
      a = ex_in[n];
      @(posedge clk); #1;
      expect_s(ex_s[n], $sformatf("example cycle %0d", n + 1));
    end
    @(posedge clk); #1;
    expect_s(32'hE36D_9093, "example final value holds");

    // 2. random runs with the latency check
    for (int run = 0; run < 40; run++) begin
      rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
      ref_sum = '0;
      for (int i = 0; i < 1 + (run % 25); i++) begin
        a = (run % 4 == 0) ? '1 : W'($urandom);   // all-ones runs: long carries
        ref_sum += a;
        @(posedge clk); #1;                        // a is now in A_Reg
      end
      a = '0;
      repeat (STAGES) @(posedge clk);
      #1 expect_s(ref_sum, $sformatf("run %0d final value at STAGES cycles", run));
      repeat (3) @(posedge clk);
      #1 expect_s(ref_sum, $sformatf("run %0d final value holds", run));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
