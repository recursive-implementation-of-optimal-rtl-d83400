// mult3m: the 3M multiplier, an N-bit by N-bit unsigned multiplier built from
// the recursive three-multiplication scheme (mul3m) followed by one
// carry-lookahead conversion (final_adder) of its carry-save result.
//
// Interface: x, y and in_valid in; product = x*y, the carry-save pair
// cs_sum1/cs_sum2 behind it, and out_valid out. The final adder's carry out is
// left unused: the carry-save pair may hold a hidden multiple of 2^(2N) (see
// mul3m) that the modulo-2^(2N) sum discards.
//
// Timing: PIPELINE = 0 (default) is combinational, out_valid = in_valid; the
// recursion has about log2(N) levels, each adding an input adder and a
// constant-depth combining adder. PIPELINE = 1 takes one operation per clock
// and delivers it LATENCY = mult_pkg::mul3m_latency(N) cycles later (10 for
// N = 32), with the final adder after the last register. rst_n (asynchronous,
// active low) clears only the valid pipeline. The valid flag, the reset and
// the register placement are this design's own; the scheme only states that
// 3M pipelines to one multiplication per clock.
module mult3m
  import mult_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter bit          PIPELINE = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           out_valid,
  output logic [2*N-1:0] cs_sum1,
  output logic [2*N-1:0] cs_sum2,
  output logic [2*N-1:0] product
);
  localparam int unsigned LATENCY = PIPELINE ? mul3m_latency(N) : 0;

  logic cout;

  mul3m #(.N(N), .PW(2*N), .PIPELINE(PIPELINE)) u_core (
    .clk(clk), .x(x), .y(y), .p1(cs_sum1), .p2(cs_sum2));

  final_adder #(.W(2*N)) u_cla (.a(cs_sum1), .b(cs_sum2), .sum(product), .cout(cout));

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
endmodule
