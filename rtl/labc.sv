// labc: linear array of bit-convolvers, the body of the 2M multiplier.
//
// Multiplies an N-bit operand X by an M-bit operand Y. The array has one
// bit_convolver per product column k = 0..M+N-1. Column k sums the products
// X_i * Y_(k-i) together with the carry vectors of column k-1, and sends its
// own carry vectors to column k+1; its two sum bits become bit k of the two
// carry-save result vectors, so X*Y = sum1 + sum2 (+ 2^(M+N) * cout terms,
// which are zero when cin is zero). Products whose Y index falls outside
// 0..M-1 are tied to zero at the leaves.
//
// The carries entering column 0 (cin1, cin2) and leaving the last column
// (cout1, cout2) are boundary connections. The multiplier ties cin to zero and
// ignores cout; bringing them out also allows the array to be probed through
// all its external connections or chained into a larger modular array, as
// the array's generator allows. N must be a power of two >= 4; M is free.
//
// Timing: combinational for PIPELINE = 0; for PIPELINE = 1, sum1/sum2 follow
// x/y by log2(N/2) clock cycles (see bit_convolver for how the carries line
// up). The column structure follows the multiplier's description; exposing the
// boundary carries as ports is this design's choice.
module labc #(
  parameter int unsigned M        = 32,
  parameter int unsigned N        = 32,
  parameter bit          PIPELINE = 1'b0
) (
  input  logic           clk,
  input  logic [N-1:0]   x,
  input  logic [M-1:0]   y,
  input  logic [N/2-2:0] cin1,
  input  logic [N/2-2:0] cin2,
  output logic [M+N-1:0] sum1,
  output logic [M+N-1:0] sum2,
  output logic [N/2-2:0] cout1,
  output logic [N/2-2:0] cout2
);
  localparam int unsigned COLS = M + N;
  localparam int unsigned S    = N/2 - 1;

  // Y with N zero bits on either side: ypad[j+N] = Y_j.
  logic [M+2*N-1:0] ypad;
  assign ypad = {{N{1'b0}}, y, {N{1'b0}}};

  // Carry vectors between columns: chain[k] enters column k.
  logic [S-1:0] chain1 [COLS+1];
  logic [S-1:0] chain2 [COLS+1];

  assign chain1[0] = cin1;
  assign chain2[0] = cin2;

  for (genvar k = 0; k < COLS; k++) begin : g_col
    logic [N-1:0] yr;

    always_comb begin
      for (int i = 0; i < N; i++) begin
        yr[i] = ypad[k - i + N];
      end
    end

    bit_convolver #(.N(N), .PIPELINE(PIPELINE)) u_bc (
      .clk(clk),
      .x  (x),
      .yr (yr),
      .c1 (chain1[k]),
      .c2 (chain2[k]),
      .s1 (sum1[k]),
      .s2 (sum2[k]),
      .d1 (chain1[k+1]),
      .d2 (chain2[k+1])
    );
  end

  assign cout1 = chain1[COLS];
  assign cout2 = chain2[COLS];
endmodule
