// tb_csa_row: random check of a 16-bit carry-save (3:2) row.
// x + y must equal u + v + w modulo 2^16, and y[0] must be 0.
module tb_csa_row;
  localparam int W = 16;
  logic [W-1:0] u, v, w, x, y;
  int checks = 0, failures = 0;

  csa_row #(.W(W)) dut (.u(u), .v(v), .w(w), .x(x), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      u = W'($urandom); v = W'($urandom); w = W'($urandom);
      if (i == 0) {u, v, w} = '1;
      #1;
      checks++;
      if (W'(x + y) != W'(u + v + w) || y[0] != 1'b0) begin
        failures++;
        $display("FAIL %h %h %h -> x=%h y=%h", u, v, w, x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
