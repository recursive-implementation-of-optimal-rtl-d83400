// csa4: 4-bit carry-save adder, the inner node of a bit-convolver tree.
//
// Takes the two sum bits of each of its two subtrees (s10, s20 and s11, s21)
// and the pair of carry-in bits (c1, c2) that the neighbouring lower column
// delivers to this tree position. It returns two sum bits (s1, s2) for its
// parent and two carry-out bits (d1, d2) of double weight for the next column:
//     s10 + s20 + s11 + s21 + c1 + c2 = s1 + s2 + 2*(d1 + d2)
// It is built from two csa cells: the first adds s10, s20, s11; the second adds
// that sum, s21 and c1; c2 passes straight through as s2. The two-cell
// structure and the invariant follow the multiplier's description; the exact
// wiring of the two cells is this design's choice. The choice makes d1 depend
// only on the subtree sums, so a carry crosses at most one column within a
// tree level and never ripples. Combinational, two cell delays.
module csa4 (
  input  logic s10,
  input  logic s20,
  input  logic s11,
  input  logic s21,
  input  logic c1,
  input  logic c2,
  output logic s1,
  output logic s2,
  output logic d1,
  output logic d2
);
  logic t;

  csa u_csa_a (.a(s10), .b(s20), .c(s11), .carry(d1), .sum(t));
  csa u_csa_b (.a(t),   .b(s21), .c(c1),  .carry(d2), .sum(s1));

  assign s2 = c2;
endmodule
