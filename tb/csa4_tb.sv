// csa4_tb: exhaustive self-check of the csa4 tree node.
// All 64 combinations of the four subtree sums and two carry-ins are applied.
// Checked: the node invariant s10+s20+s11+s21+c1+c2 = s1+s2+2*(d1+d2), and
// that d1 does not depend on the carry-ins (the property that keeps a carry
// from rippling through more than one column).
module csa4_tb;
  logic s10, s20, s11, s21, c1, c2, s1, s2, d1, d2;
  int   checks = 0, failures = 0;

  csa4 dut (.s10(s10), .s20(s20), .s11(s11), .s21(s21), .c1(c1), .c2(c2),
            .s1(s1), .s2(s2), .d1(d1), .d2(d2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic d1_ref [16];
    int   lhs, rhs;
    for (int v = 0; v < 64; v++) begin
      {s10, s20, s11, s21, c1, c2} = 6'(v);
      #1;
      lhs = int'(s10) + int'(s20) + int'(s11) + int'(s21) + int'(c1) + int'(c2);
      rhs = int'(s1) + int'(s2) + 2 * (int'(d1) + int'(d2));
      checks++;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL in=%06b -> s1=%0b s2=%0b d1=%0b d2=%0b", 6'(v), s1, s2, d1, d2);
      end
      if ((v & 3) == 0) d1_ref[v >> 2] = d1;
      else begin
        checks++;
        if (d1 != d1_ref[v >> 2]) begin
          failures++;
          $display("FAIL d1 depends on the carry-ins, in=%06b", 6'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
