// tb_dff_array: 8-bit register: loads every rising edge, synchronous reset.
// Checks that q follows d one edge later, that q does not change between
// edges, and that rst clears q only at a clock edge.
module tb_dff_array;
  localparam int W = 8;
  logic clk = 1'b0, rst;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  dff_array #(.W(W)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(logic [W-1:0] want, string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%h want %h", what, q, want);
    end
  endtask

  initial begin
    rst = 1'b1; d = 8'hA5;
    @(posedge clk); #1;
    expect_q('0, "reset");
    rst = 1'b0;
    for (int i = 0; i < 50; i++) begin
      d = W'($urandom);
      prev = q;
      #2;
      expect_q(prev, "hold between edges");
      @(posedge clk); #1;
      expect_q(d, "load");
    end
    d = 8'h3C; @(posedge clk); #1;
    rst = 1'b1; #2;
    expect_q(8'h3C, "reset waits for the edge");
    @(posedge clk); #1;
    expect_q('0, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
