// bit_convolver: one column of the 2M multiplier (a BITADD tree).
//
// Column k of an X-by-Y product receives the N partial products
// a_i = X_i * Y_(k-i), i = 0..N-1, plus two carry vectors C1, C2 of
// S = N/2-1 bits from column k-1. It returns two sum bits and two carry vectors
// D1, D2 of S bits for column k+1, such that
//     sum(a) + sum(C1) + sum(C2) = s1 + s2 + 2*(sum(D1) + sum(D2)).
// The module is recursive: for N = 4 it is two mu2 leaves under one csa4;
// above that it is two half-size bit_convolvers (low and high halves of the
// products) under one csa4. The carry vectors are split the same way:
// D = {D_low, d_mid, D_high}, index 0..S/2-1 to the low subtree, index
// (S-1)/2 to this node's csa4, the rest to the high subtree. A tree of depth
// log2(N/2) csa4 levels results, so the delay grows with log N.
//
// Inputs: x holds X_0..X_(N-1); yr[i] holds Y_(k-i) (zero where k-i is not a
// bit of Y), so that a leaf at position i sees X_i, X_(i+1), Y_(k-i),
// Y_(k-i-1).
//
// Timing: with PIPELINE = 0 (the default, as in the combinational prototypes)
// everything is combinational and clk is unused. With PIPELINE = 1 the two sum
// outputs of every csa4 are registered, giving one operation per clock and a
// latency of log2(N/2) cycles from x/yr to s1/s2. Carries are not registered:
// a carry produced at tree level L (level 1 is next to the leaves) is valid
// L-1 cycles after its operation entered, which is exactly when the csa4 at the
// same level of column k+1 needs it. The register option is this design's own
// reading of the statement that the multiplier pipelines to period 1.
//
// Lint note: linted on its own as a top-level module, Verilator reports the
// subtree sums (s1_lo ... s2_hi) as undriven and H as unused; it does not
// elaborate the self-instantiation of a recursive top. Instantiated (as in
// labc) the recursion elaborates fully and no such warning appears.
module bit_convolver #(
  parameter int unsigned N        = 32,
  parameter bit          PIPELINE = 1'b0
) (
  input  logic           clk,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   yr,
  input  logic [N/2-2:0] c1,
  input  logic [N/2-2:0] c2,
  output logic           s1,
  output logic           s2,
  output logic [N/2-2:0] d1,
  output logic [N/2-2:0] d2
);
  localparam int unsigned S   = N/2 - 1;  // carry vector length
  localparam int unsigned MID = S/2;      // index of this node's carries

  // Sums of the two subtrees, the inputs of this node's csa4.
  logic s1_lo, s2_lo, s1_hi, s2_hi;
  logic n_s1, n_s2;

  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0)
      else $fatal(1, "bit_convolver: N must be a power of two >= 4");
  end

  if (N == 4) begin : g_leaves
    mu2 u_leaf_lo (.x0(x[0]), .x1(x[1]), .y0(yr[0]), .y1(yr[1]),
                   .p1(s1_lo), .p2(s2_lo));
    mu2 u_leaf_hi (.x0(x[2]), .x1(x[3]), .y0(yr[2]), .y1(yr[3]),
                   .p1(s1_hi), .p2(s2_hi));
  end else begin : g_subtrees
    localparam int unsigned H = N/2;

    bit_convolver #(.N(H), .PIPELINE(PIPELINE)) u_lo (
      .clk(clk),
      .x  (x[H-1:0]),
      .yr (yr[H-1:0]),
      .c1 (c1[MID-1:0]),
      .c2 (c2[MID-1:0]),
      .s1 (s1_lo),
      .s2 (s2_lo),
      .d1 (d1[MID-1:0]),
      .d2 (d2[MID-1:0])
    );

    bit_convolver #(.N(H), .PIPELINE(PIPELINE)) u_hi (
      .clk(clk),
      .x  (x[N-1:H]),
      .yr (yr[N-1:H]),
      .c1 (c1[S-1:MID+1]),
      .c2 (c2[S-1:MID+1]),
      .s1 (s1_hi),
      .s2 (s2_hi),
      .d1 (d1[S-1:MID+1]),
      .d2 (d2[S-1:MID+1])
    );
  end

  csa4 u_node (
    .s10(s1_lo), .s20(s2_lo), .s11(s1_hi), .s21(s2_hi),
    .c1 (c1[MID]), .c2(c2[MID]),
    .s1 (n_s1), .s2(n_s2),
    .d1 (d1[MID]), .d2(d2[MID])
  );

  if (PIPELINE) begin : g_reg
    always_ff @(posedge clk) begin
      s1 <= n_s1;
      s2 <= n_s2;
    end
  end else begin : g_comb
    assign s1 = n_s1;
    assign s2 = n_s2;
  end
endmodule
