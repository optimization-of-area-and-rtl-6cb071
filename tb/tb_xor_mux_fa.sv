// tb_xor_mux_fa: exhaustive check of the XOR/MUX full adder.
// All eight input combinations; sum and carry are compared with the
// arithmetic sum a + b + cin computed in the testbench.
module tb_xor_mux_fa;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  xor_mux_fa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(a) + 2'(b) + 2'(cin)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
