// mult2m: the 2M multiplier, an N-bit by M-bit unsigned integer multiplier
// of logarithmic delay.
//
// X (N bits) is recursively split in halves; in the equivalent column view used
// here, a linear array of bit-convolvers (labc) reduces all partial products
// X_i * Y_j of each product column with a binary tree of csa4 cells, passing
// carries to the next column, and yields the product as two carry-save
// vectors. A log-depth carry-lookahead adder (final_adder) turns that pair into
// the binary product. Column tree depth is log2(N/2) csa4 levels, i.e.
// 2*log2(N/2) full-adder delays, plus one AND delay.
//
// Interface: x, y and in_valid in; product, the carry-save pair cs_sum1 /
// cs_sum2 (cs_sum1 + cs_sum2 = x*y) and out_valid out. The carry vectors into
// the first column are tied to zero, the ones out of the last column are
// provably zero and are checked by an assertion.
//
// Timing: PIPELINE = 0 (default, like the combinational prototypes) gives a
// purely combinational multiplier, out_valid = in_valid. PIPELINE = 1
// registers every tree level: a new operation can enter every clock and the
// result appears LATENCY = log2(N/2) cycles later, flagged by out_valid; the
// final adder stays combinational after the last register. rst_n (active low,
// asynchronous) clears only the valid pipeline. The valid flag and the reset
// are this design's additions.
module mult2m
  import mult_pkg::*;
#(
  parameter int unsigned M        = 32,
  parameter int unsigned N        = 32,
  parameter bit          PIPELINE = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  input  logic [M-1:0]   y,
  output logic           out_valid,
  output logic [M+N-1:0] cs_sum1,
  output logic [M+N-1:0] cs_sum2,
  output logic [M+N-1:0] product
);
  localparam int unsigned LATENCY = PIPELINE ? mult2m_latency(N) : 0;
  localparam int unsigned S       = N/2 - 1;

  logic [S-1:0] cout1, cout2;
  logic         add_cout;

  labc #(.M(M), .N(N), .PIPELINE(PIPELINE)) u_labc (
    .clk  (clk),
    .x    (x),
    .y    (y),
    .cin1 ('0),
    .cin2 ('0),
    .sum1 (cs_sum1),
    .sum2 (cs_sum2),
    .cout1(cout1),
    .cout2(cout2)
  );

  final_adder #(.W(M+N)) u_cla (
    .a   (cs_sum1),
    .b   (cs_sum2),
    .sum (product),
    .cout(add_cout)
  );

  if (LATENCY == 0) begin : g_comb_valid
    assign out_valid = in_valid;
  end else begin : g_pipe_valid
    logic [LATENCY-1:0] vld;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld <= '0;
      else        vld <= (vld << 1) | LATENCY'(in_valid);
    end
    assign out_valid = vld[LATENCY-1];
  end

  // The product of an N-bit and an M-bit number fits in M+N bits, so nothing
  // may leave the last column and the final addition may not overflow.
  always_comb begin
    if (out_valid) begin
      assert (add_cout == 1'b0) else $error("mult2m: final adder overflow");
    end
  end
  if (LATENCY == 0) begin : g_chk_cout
    always_comb begin
      assert (cout1 == '0 && cout2 == '0)
        else $error("mult2m: carry out of the last column");
    end
  end
endmodule
