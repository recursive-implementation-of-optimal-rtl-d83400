// mu2: leaf cell of a bit-convolver tree.
//
// Two AND gates. At array position (i, j) it forms the partial products
// p1 = X_i * Y_j and p2 = X_(i+1) * Y_(j-1); both have weight 2^(i+j), so the
// pair is already a carry-save pair that feeds a csa4 directly. Combinational,
// one gate delay (D_MU2 = D_AND). Precharged gates are represented by their
// logic function.
module mu2 (
  input  logic x0,  // X_i
  input  logic x1,  // X_(i+1)
  input  logic y0,  // Y_j
  input  logic y1,  // Y_(j-1)
  output logic p1,
  output logic p2
);
  assign p1 = x0 & y0;
  assign p2 = x1 & y1;
endmodule
