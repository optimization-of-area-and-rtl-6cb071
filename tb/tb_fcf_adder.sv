// tb_fcf_adder: FCF segmented adder, default size (32 bits, 2 segments) and a
// 16-bit, 4-segment instance.
//  1. Cycle-exact carry delay: a carry out of a segment reaches the next
//     segment exactly one cycle later.
//  2. Conservation: over a random run followed by zero operands (to empty the
//     carry flip-flops), the sum of all outputs equals the sum of all operands
//     modulo 2^W, i.e. every carry is added once and only once.
module tb_fcf_adder;
  logic clk = 1'b0, rst;
  logic [31:0] x2, y2, s2;
  logic [15:0] x4, y4, s4;
  logic        cin2, cin4;
  int checks = 0, failures = 0;

  fcf_adder dut2 (.clk(clk), .rst(rst), .x(x2), .y(y2), .cin(cin2), .sum(s2));
  fcf_adder #(.W(16), .STAGES(4)) dut4 (.clk(clk), .rst(rst), .x(x4), .y(y4), .cin(cin4), .sum(s4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect32(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  logic [31:0] acc_in2, acc_out2;
  logic [15:0] acc_in4, acc_out4;

  initial begin
    rst = 1'b1; x2 = '0; y2 = '0; cin2 = 1'b0; x4 = '0; y4 = '0; cin4 = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;

    // 1. carry delay, 2 segments: 0000FFFF + 1 -> low half wraps, carry later
    x2 = 32'h0000_FFFF; y2 = 32'h0000_0001;
    #1 expect32(s2, 32'h0000_0000, "2-seg: carry not added in the same cycle");
    @(posedge clk); #1;
    x2 = '0; y2 = '0;
    #1 expect32(s2, 32'h0001_0000, "2-seg: carry added one cycle later");
    @(posedge clk); #1;
    #1 expect32(s2, 32'h0000_0000, "2-seg: carry added only once");

    // carry delay through 4 segments: a carry climbs one segment per cycle
    // through segments that are all ones
    x4 = 16'h000F; y4 = 16'h0001;
    #1 expect32(32'(s4), 32'h0000, "4-seg: cycle 0 (seg 0 wraps)");
    @(posedge clk); #1;
    x4 = 16'h00F0; y4 = '0;
    #1 expect32(32'(s4), 32'h0000, "4-seg: cycle 1 (carry wraps seg 1)");
    @(posedge clk); #1;
    x4 = 16'h0F00;
    #1 expect32(32'(s4), 32'h0000, "4-seg: cycle 2 (carry wraps seg 2)");
    @(posedge clk); #1;
    x4 = 16'h0000;
    #1 expect32(32'(s4), 32'h1000, "4-seg: cycle 3 (carry reaches seg 3)");
    @(posedge clk); #1;
    #1 expect32(32'(s4), 32'h0000, "4-seg: empty afterwards");

    // 2. conservation over random runs
    for (int run = 0; run < 20; run++) begin
      acc_in2 = '0; acc_out2 = '0; acc_in4 = '0; acc_out4 = '0;
      for (int i = 0; i < 40 + 4; i++) begin
        if (i < 40) begin
          x2 = $urandom; y2 = $urandom; cin2 = 1'($urandom);
          x4 = 16'($urandom); y4 = 16'($urandom); cin4 = 1'($urandom);
        end else begin
          x2 = '0; y2 = '0; cin2 = 1'b0; x4 = '0; y4 = '0; cin4 = 1'b0;
        end
        #1;
        acc_in2  += x2 + y2 + 32'(cin2);
        acc_out2 += s2;
        acc_in4  += x4 + y4 + 16'(cin4);
        acc_out4 += s4;
        @(posedge clk); #1;
      end
      expect32(acc_out2, acc_in2, "2-seg conservation");
      expect32(32'(acc_out4), 32'(acc_in4), "4-seg conservation");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
