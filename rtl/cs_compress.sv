// cs_compress: reduces K vectors of W bits to a carry-save pair.
//
// Helper of the 3M multiplier's combining adder. Each layer groups the
// vectors in threes and replaces every group by a sum vector and a carry
// vector (a row of full adders in the csa cell's selector form, written as
// vector expressions, the carry shifted up one place); vectors left
// over pass to the next layer unchanged. The module recurses until two vectors
// remain, so the depth is about log_1.5(K/2) csa delays, independent of W.
// All arithmetic is modulo 2^W: out0 + out1 = sum of in[k] (mod 2^W).
// Combinational.
//
// Lint note: linted on its own as a top-level module, Verilator reports out0
// and out1 as undriven because it does not elaborate the self-instantiation
// of a recursive top; instantiated (as in mul3m) it elaborates fully.
module cs_compress #(
  parameter int unsigned W = 8,
  parameter int unsigned K = 3
) (
  input  logic [K-1:0][W-1:0] in,
  output logic [W-1:0]        out0,
  output logic [W-1:0]        out1
);
  if (K == 1) begin : g_one
    assign out0 = in[0];
    assign out1 = '0;
  end else if (K == 2) begin : g_two
    assign out0 = in[0];
    assign out1 = in[1];
  end else begin : g_layer
    localparam int unsigned G  = K / 3;          // full groups of three
    localparam int unsigned R  = K - 3 * G;      // vectors passed through
    localparam int unsigned KN = 2 * G + R;      // vectors after this layer

    logic [KN-1:0][W-1:0] nxt;

    for (genvar g = 0; g < G; g++) begin : g_grp
      logic [W-1:0] a, b, c, cy;
      assign a = in[3*g];
      assign b = in[3*g+1];
      assign c = in[3*g+2];
      // A row of csa cells in selector form: where a+b is odd the carry is c
      // and the sum is not c; elsewhere the carry is a and the sum is c.
      assign cy         = ((a ^ b) & c) | (~(a ^ b) & a);
      assign nxt[2*g]   = ((a ^ b) & ~c) | (~(a ^ b) & c);
      assign nxt[2*g+1] = {cy[W-2:0], 1'b0};
    end
    for (genvar r = 0; r < R; r++) begin : g_pass
      assign nxt[2*G+r] = in[3*G+r];
    end

    cs_compress #(.W(W), .K(KN)) u_next (.in(nxt), .out0(out0), .out1(out1));
  end
endmodule
