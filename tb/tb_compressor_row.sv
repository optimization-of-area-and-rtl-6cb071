// tb_compressor_row: random check of a 16-bit 4:2 compressor row.
// s + c must equal r0 + r1 + r2 + r3 modulo 2^16, and c[0] must be 0.
module tb_compressor_row;
  localparam int W = 16;
  logic [W-1:0] r0, r1, r2, r3, s, c;
  int checks = 0, failures = 0;

  compressor_row #(.W(W)) dut (.r0(r0), .r1(r1), .r2(r2), .r3(r3), .s(s), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] ref_sum;
    #1;
    ref_sum = r0 + r1 + r2 + r3;
    checks++;
    if (W'(s + c) != ref_sum || c[0] != 1'b0) begin
      failures++;
      $display("FAIL %h %h %h %h -> s=%h c=%h (want sum %h)", r0, r1, r2, r3, s, c, ref_sum);
    end
  endtask

  initial begin
    {r0, r1, r2, r3} = '1; check();
    {r0, r1, r2, r3} = '0; check();
    for (int i = 0; i < 2000; i++) begin
      r0 = W'($urandom); r1 = W'($urandom); r2 = W'($urandom); r3 = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
