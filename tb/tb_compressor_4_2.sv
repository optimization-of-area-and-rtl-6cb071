// tb_compressor_4_2: exhaustive check of the 4:2 compressor.
// For all 32 input combinations: x1+x2+x3+x4+cin == sum + 2*(carry+cout),
// and cout must not depend on cin (no horizontal ripple).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  logic cout_cin0;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x1, x2, x3, x4} = 4'(v);
      cin = 1'b0;
      #1;
      cout_cin0 = cout;
      for (int c = 0; c < 2; c++) begin
        cin = 1'(c);
        #1;
        checks++;
        if (3'(sum) + 3'(2) * (3'(carry) + 3'(cout)) !=
            3'(x1) + 3'(x2) + 3'(x3) + 3'(x4) + 3'(cin)) begin
          failures++;
          $display("FAIL in=%b cin=%b -> sum=%b carry=%b cout=%b", v[3:0], cin, sum, carry, cout);
        end
        checks++;
        if (cout != cout_cin0) begin
          failures++;
          $display("FAIL cout depends on cin for in=%b", v[3:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
