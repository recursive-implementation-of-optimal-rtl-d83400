// final_adder: carry-lookahead adder that turns the carry-save product into
// ordinary binary.
//
// Adds two W-bit vectors in logarithmic depth. Bit generate/propagate pairs
// are combined by a Brent-Kung parallel-prefix network: an up-sweep builds
// group pairs over spans 2, 4, 8, ... and a down-sweep fills in the remaining
// prefixes, so every carry is known after about 2*log2(W) combine levels.
// sum = a + b modulo 2^W; cout is the carry out of bit W-1. Combinational.
// The multiplier only asks for a fast log-time carry-lookahead adder here; the
// particular prefix network is this design's choice.
module final_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] g0, p0;  // bit generate / propagate
  logic [W-1:0] gg, pp;  // prefix generate / propagate, gg[i] = carry out of bit i

  always_comb begin
    g0 = a & b;
    p0 = a ^ b;
    gg = g0;
    pp = p0;
    // Up-sweep.
    for (int d = 1; d < W; d = d * 2) begin
      for (int i = 2 * d - 1; i < W; i = i + 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    end
    // Down-sweep.
    for (int d = 2 ** ($clog2(W) - 1); d >= 1; d = d / 2) begin
      for (int i = 3 * d - 1; i < W; i = i + 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    end
    sum[0] = p0[0];
    for (int i = 1; i < W; i++) begin
      sum[i] = p0[i] ^ gg[i-1];
    end
    cout = gg[W-1];
  end
endmodule
