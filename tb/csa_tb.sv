// csa_tb: exhaustive self-check of the csa full-adder cell.
// All eight input combinations are applied; the reference is the integer sum
// a+b+c, which must equal 2*carry + sum. A watchdog ends the run if it hangs.
module csa_tb;
  logic a, b, c, carry, sum;
  int   checks = 0, failures = 0;

  csa dut (.a(a), .b(b), .c(c), .carry(carry), .sum(sum));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> carry=%0b sum=%0b", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
