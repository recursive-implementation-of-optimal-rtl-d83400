// multipliers_top: the two logarithmic-time multipliers side by side.
//
// m2_*: the 2M multiplier (mult2m), an N-bit X by M-bit Y product formed by a
//       linear array of bit-convolver trees and one carry-lookahead adder.
//       This is the multiplier that is laid out and fabricated at 8, 16 and
//       32 bits; the default here is the 32x32 version. Optional period-1
//       pipeline (PIPELINE = 1, latency log2(N/2) cycles, m2_out_valid marks
//       results); combinational by default.
// m3_*: the 3M multiplier (mult3m), an N3-bit square product by the recursive
//       three-multiplication scheme with carry-save intermediate results.
//       Combinational by default; PIPELINE3 = 1 gives one operation per clock
//       with a latency of mult_pkg::mul3m_latency(N3) cycles (10 for N3 = 32),
//       flagged by m3_out_valid.
//
// The two share nothing but clk/rst_n, which only the pipelines use. Both
// return the product in binary and as the carry-save pair it came from.
module multipliers_top #(
  parameter int unsigned M         = 32,
  parameter int unsigned N         = 32,
  parameter bit          PIPELINE  = 1'b0,
  parameter int unsigned N3        = 32,
  parameter bit          PIPELINE3 = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  // 2M multiplier
  input  logic            m2_in_valid,
  input  logic [N-1:0]    m2_x,
  input  logic [M-1:0]    m2_y,
  output logic            m2_out_valid,
  output logic [M+N-1:0]  m2_cs_sum1,
  output logic [M+N-1:0]  m2_cs_sum2,
  output logic [M+N-1:0]  m2_product,
  // 3M multiplier
  input  logic            m3_in_valid,
  input  logic [N3-1:0]   m3_x,
  input  logic [N3-1:0]   m3_y,
  output logic            m3_out_valid,
  output logic [2*N3-1:0] m3_cs_sum1,
  output logic [2*N3-1:0] m3_cs_sum2,
  output logic [2*N3-1:0] m3_product
);
  mult2m #(.M(M), .N(N), .PIPELINE(PIPELINE)) u_mult2m (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (m2_in_valid),
    .x        (m2_x),
    .y        (m2_y),
    .out_valid(m2_out_valid),
    .cs_sum1  (m2_cs_sum1),
    .cs_sum2  (m2_cs_sum2),
    .product  (m2_product)
  );

  mult3m #(.N(N3), .PIPELINE(PIPELINE3)) u_mult3m (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (m3_in_valid),
    .x        (m3_x),
    .y        (m3_y),
    .out_valid(m3_out_valid),
    .cs_sum1  (m3_cs_sum1),
    .cs_sum2  (m3_cs_sum2),
    .product  (m3_product)
  );
endmodule
