// tb_mfcf_logic: the four rows of the MFCF truth tables, plus the property
// that the merged contribution -a_fix + carry_fix equals -sign + carry.
module tb_mfcf_logic;
  logic sign, carry, a_fix, carry_fix;
  int checks = 0, failures = 0;
  // expected {a_fix, carry_fix} for {sign, carry} = 00, 01, 10, 11
  logic [1:0] table_exp [4] = '{2'b00, 2'b01, 2'b10, 2'b00};

  mfcf_logic dut (.sign(sign), .carry(carry), .a_fix(a_fix), .carry_fix(carry_fix));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {sign, carry} = 2'(v);
      #1;
      checks++;
      if ({a_fix, carry_fix} != table_exp[v]) begin
        failures++;
        $display("FAIL sign=%b carry=%b -> a_fix=%b carry_fix=%b", sign, carry, a_fix, carry_fix);
      end
      checks++;
      if (int'(carry_fix) - int'(a_fix) != int'(carry) - int'(sign)) begin
        failures++;
        $display("FAIL value not preserved for sign=%b carry=%b", sign, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
