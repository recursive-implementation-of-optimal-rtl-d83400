// delay_line: a W-bit shift register of D stages (D = 0 is a plain wire).
// Used to line up operands and sub-products of unequal latency in the
// pipelined 3M multiplier. No reset: it carries data only.
module delay_line #(
  parameter int unsigned W = 8,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] stage [D];
    always_ff @(posedge clk) begin
      stage[0] <= din;
      for (int i = 1; i < D; i++) stage[i] <= stage[i-1];
    end
    assign dout = stage[D-1];
  end
endmodule
