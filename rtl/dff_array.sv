// dff_array: W-bit register with synchronous, active-high reset.
//
// Loads d on every rising clock edge; rst clears it to zero on the edge. It is
// the input buffer, output buffer, pipeline-stage register and inserted carry
// flip-flop of the FCF accumulators and MAC. The reset is synchronous because
// the implemented design has no asynchronous control signals; there is no
// enable since every buffer takes a new value each cycle.
module dff_array #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
