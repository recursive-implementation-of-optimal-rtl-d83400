// mu2_tb: exhaustive self-check of the mu2 leaf cell (two AND gates).
// Each of the 16 input combinations is compared with p1 = x0&y0, p2 = x1&y1,
// computed here from the truth table of AND.
module mu2_tb;
  logic x0, x1, y0, y1, p1, p2;
  int   checks = 0, failures = 0;

  mu2 dut (.x0(x0), .x1(x1), .y0(y0), .y1(y1), .p1(p1), .p2(p2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x0, x1, y0, y1} = 4'(v);
      #1;
      checks++;
      if (p1 != (x0 && y0) || p2 != (x1 && y1)) begin
        failures++;
        $display("FAIL x0=%0b x1=%0b y0=%0b y1=%0b -> p1=%0b p2=%0b", x0, x1, y0, y1, p1, p2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
