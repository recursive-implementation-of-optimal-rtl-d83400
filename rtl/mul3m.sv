// mul3m: recursive core of the 3M (three-multiplication) multiplier.
//
// Splits the N-bit operands at H = N/2: X = X1*2^H + X0, Y = Y1*2^H + Y0, and
// forms three half-size products
//     V = X1*Y1,   W = X0*Y0,   U = (X1+X0)*(Y1+Y0)
// with recursive instances of itself, then combines them as
//     P = V*2^(2H) + (U - V - W)*2^H + W.
// The two input sums are formed by carry-lookahead adders (final_adder). Each
// sub-product comes back as a carry-save pair; the combining adder takes the
// six vectors of V, U and W in their shifted positions, the two's complement
// of the four vectors of V and W at position H (bitwise inverse plus a
// constant 4), and reduces these eleven vectors to one carry-save pair with
// rows of csa cells (cs_compress). No carry is propagated inside the combining
// adder, so its delay is constant per recursion level.
// The recursion ends at N <= 3, where the product of the two small operands
// is formed directly and returned as a pair (product, 0).
//
// A carry-save pair only represents its value modulo 2^PW, and after a
// subtraction the pair may carry a hidden multiple of 2^PW. Each
// sub-multiplier is therefore made as wide as the part of its parent's
// result it can reach: V and U get PW-H bits, W gets PW bits. The top level
// uses PW = 2N. Outputs: p1 + p2 = x*y (mod 2^PW).
//
// Timing: combinational for PIPELINE = 0 (clk unused). For PIPELINE = 1 each
// recursion level registers its input sums (together with the operand
// halves) and its combining-adder output, and delays V and W to line up with
// U, the widest and slowest sub-product. One operation enters per clock; the
// result follows after mult_pkg::mul3m_latency(N) cycles (10 for N = 32).
//
// The recurrence, the three sub-multipliers and the carry-save intermediate
// results follow the 3M scheme as described for this multiplier; the binary
// input adders, the split point, the base case, the width rule and the
// placement of the pipeline registers are this design's own choices.
//
// Lint note: linted on its own as a top-level module, Verilator reports the
// sub-product vectors (v1 ... w2) as undriven because it does not elaborate
// the self-instantiation of a recursive top; instantiated (as in mult3m) the
// recursion elaborates fully.
module mul3m
  import mult_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned PW       = 2 * N,
  parameter bit          PIPELINE = 1'b0
) (
  input  logic          clk,
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  y,
  output logic [PW-1:0] p1,
  output logic [PW-1:0] p2
);
  if (N <= 3) begin : g_base
    logic [2*N-1:0] prod;
    always_comb begin
      prod = '0;
      for (int j = 0; j < N; j++) begin
        if (y[j]) prod = prod + ((2*N)'(x) << j);
      end
    end
    assign p1 = PW'(prod);
    assign p2 = '0;
  end else begin : g_rec
    localparam int unsigned H  = N / 2;       // width of the low halves
    localparam int unsigned HI = N - H;       // width of the high halves
    localparam int unsigned SU = HI + 1;      // width of X1+X0 and Y1+Y0
    localparam int unsigned PV = PW - H;      // result width of V and U
    localparam int unsigned PU = PW - H;
    // Extra delay that lines V and W up with U, the slowest sub-product.
    localparam int unsigned DV = PIPELINE ? mul3m_latency(SU) - mul3m_latency(HI) : 0;
    localparam int unsigned DW = PIPELINE ? mul3m_latency(SU) - mul3m_latency(H)  : 0;
    localparam int unsigned DI = PIPELINE ? 1 : 0;   // input-stage register

    logic [SU-1:0] xs, ys, xs_q, ys_q;
    logic          xs_co, ys_co;
    logic [N-1:0]  x_q, y_q;
    logic [PV-1:0] v1, v2, v1_q, v2_q;
    logic [PU-1:0] u1, u2;
    logic [PW-1:0] w1, w2, w1_q, w2_q;
    logic [PW-1:0] c0, c1;

    // Input adders: X1+X0 and Y1+Y0.
    final_adder #(.W(SU)) u_xadd (.a(SU'(x[N-1:H])), .b(SU'(x[H-1:0])), .sum(xs), .cout(xs_co));
    final_adder #(.W(SU)) u_yadd (.a(SU'(y[N-1:H])), .b(SU'(y[H-1:0])), .sum(ys), .cout(ys_co));

    // Input stage register (pipelined only): sums and halves together.
    delay_line #(.W(2*SU+2*N), .D(DI)) u_in_q (
      .clk(clk), .din({xs, ys, x, y}), .dout({xs_q, ys_q, x_q, y_q}));

    // Three half-size multipliers.
    mul3m #(.N(HI), .PW(PV), .PIPELINE(PIPELINE)) u_v (
      .clk(clk), .x(x_q[N-1:H]), .y(y_q[N-1:H]), .p1(v1), .p2(v2));
    mul3m #(.N(SU), .PW(PU), .PIPELINE(PIPELINE)) u_u (
      .clk(clk), .x(xs_q), .y(ys_q), .p1(u1), .p2(u2));
    mul3m #(.N(H),  .PW(PW), .PIPELINE(PIPELINE)) u_w (
      .clk(clk), .x(x_q[H-1:0]), .y(y_q[H-1:0]), .p1(w1), .p2(w2));

    delay_line #(.W(2*PV), .D(DV)) u_v_q (.clk(clk), .din({v1, v2}), .dout({v1_q, v2_q}));
    delay_line #(.W(2*PW), .D(DW)) u_w_q (.clk(clk), .din({w1, w2}), .dout({w1_q, w2_q}));

    // Combining adder: eleven vectors to one carry-save pair.
    logic [10:0][PW-1:0] terms;
    always_comb begin
      terms[0]  = PW'({v1_q, {H{1'b0}}}) << H;  // V * 2^(2H)
      terms[1]  = PW'({v2_q, {H{1'b0}}}) << H;
      terms[2]  = {u1, {H{1'b0}}};              // U * 2^H
      terms[3]  = {u2, {H{1'b0}}};
      terms[4]  = ~{v1_q, {H{1'b0}}};           // -V * 2^H (with +1 below)
      terms[5]  = ~{v2_q, {H{1'b0}}};
      terms[6]  = ~(w1_q << H);                 // -W * 2^H (with +1 below)
      terms[7]  = ~(w2_q << H);
      terms[8]  = w1_q;                         // W
      terms[9]  = w2_q;
      terms[10] = PW'(4);                       // the four +1 of the negations
    end

    cs_compress #(.W(PW), .K(11)) u_comb (.in(terms), .out0(c0), .out1(c1));

    // Output stage register (pipelined only).
    delay_line #(.W(2*PW), .D(DI)) u_out_q (.clk(clk), .din({c0, c1}), .dout({p1, p2}));
  end
endmodule
