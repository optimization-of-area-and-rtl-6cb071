// tb_fcf_mac: FCF multiply-accumulate unit at its default size (8 x 8 -> 16).
// Random runs of unsigned operand pairs, plus runs of all-ones operands (the
// largest partial-product columns). After the last pair reached the input
// buffer, operands are held at zero; the output must equal the sum of the
// products modulo 2^16 exactly STAGES + 1 = 3 cycles later and stay there.
// Also checks a single product in isolation (0xFF * 0xFF = 0xFE01).
module tb_fcf_mac;
  localparam int STAGES = 2;
  logic clk = 1'b0, rst;
  logic [7:0]  a, b;
  logic [15:0] s, ref_sum;
  int checks = 0, failures = 0;

  fcf_mac dut (.clk(clk), .rst(rst), .a(a), .b(b), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_s(logic [15:0] want, string what);
    checks++;
    if (s !== want) begin
      failures++;
      $display("FAIL %s: S=%h want %h", what, s, want);
    end
  endtask

  initial begin
    rst = 1'b1; a = '0; b = '0;
    @(posedge clk); #1;
    rst = 1'b0;

    a = 8'hFF; b = 8'hFF; @(posedge clk); #1;
    a = '0; b = '0;
    repeat (STAGES + 1) @(posedge clk);
    #1 expect_s(16'hFE01, "single product FF*FF");

    for (int run = 0; run < 60; run++) begin
      rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
      ref_sum = '0;
      for (int i = 0; i < 1 + (run % 37); i++) begin
        if (run % 6 == 0) begin a = 8'hFF; b = 8'hFF; end
        else begin a = 8'($urandom); b = 8'($urandom); end
        ref_sum += 16'(a) * 16'(b);
        @(posedge clk); #1;           // the pair is now in the input buffer
      end
      a = '0; b = '0;
      repeat (STAGES + 1) @(posedge clk);
      #1 expect_s(ref_sum, $sformatf("run %0d final value at STAGES+1 cycles", run));
      repeat (3) @(posedge clk);
      #1 expect_s(ref_sum, $sformatf("run %0d final value holds", run));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
