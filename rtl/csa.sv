// csa: one carry-save (full) adder cell.
//
// Adds three bits of equal weight, a + b + c = 2*carry + sum. The logic is
// written in the selector form used by the multiplier's precharged cell: when
// a+b is odd the carry copies c and the sum is the complement of c; when a+b is
// even the carry copies a and the sum copies c. Purely combinational, one cell
// delay (D_CSA). The transistor-level precharged circuit is represented only by
// this logic function.
module csa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic carry,
  output logic sum
);
  logic odd_ab;

  always_comb begin
    odd_ab = a ^ b;
    if (odd_ab) begin
      carry = c;
      sum   = ~c;
    end else begin
      carry = a;
      sum   = c;
    end
  end
endmodule
