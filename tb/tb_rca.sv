// tb_rca: check of the 16-bit ripple-carry adder.
// Corner cases (full carry ripple) and random operands; {cout, sum} is
// compared with the 17-bit sum a + b + cin.
module tb_rca;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if ({cout, sum} != (W+1)'(a) + (W+1)'(b) + (W+1)'(cin)) begin
      failures++;
      $display("FAIL %h + %h + %b -> %b %h", a, b, cin, cout, sum);
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    for (int i = 0; i < 2000; i++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
