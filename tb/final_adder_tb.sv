// final_adder_tb: self-check of the carry-lookahead adder.
// Two instances, W = 64 (the default, the width of a 32x32 product) and an
// odd W = 13, are driven with corner cases (all ones plus one, alternating
// patterns, zero) and random operands; the reference is the simulator's own
// wide addition.
module final_adder_tb;
  localparam int unsigned W1 = 64;
  localparam int unsigned W2 = 13;

  logic [W1-1:0] a1, b1, s1;
  logic          co1;
  logic [W2-1:0] a2, b2, s2;
  logic          co2;
  int            checks = 0, failures = 0;

  final_adder              dut1 (.a(a1), .b(b1), .sum(s1), .cout(co1));
  final_adder #(.W(W2))    dut2 (.a(a2), .b(b2), .sum(s2), .cout(co2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check1(input logic [W1-1:0] a, input logic [W1-1:0] b);
    logic [W1:0] ref_sum;
    a1 = a; b1 = b;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b};
    checks++;
    if ({co1, s1} != ref_sum) begin
      failures++;
      $display("FAIL W=%0d %h + %h -> %b %h", W1, a, b, co1, s1);
    end
  endtask

  task automatic check2(input logic [W2-1:0] a, input logic [W2-1:0] b);
    logic [W2:0] ref_sum;
    a2 = a; b2 = b;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b};
    checks++;
    if ({co2, s2} != ref_sum) begin
      failures++;
      $display("FAIL W=%0d %h + %h -> %b %h", W2, a, b, co2, s2);
    end
  endtask

  initial begin
    check1('0, '0);
    check1('1, 64'd1);
    check1('1, '1);
    check1({32{2'b10}}, {32{2'b01}});
    check1({32{2'b10}}, {32{2'b11}});
    for (int i = 0; i < W1; i++) check1(W1'(1) << i, (W1'(1) << i) - 1);
    for (int i = 0; i < 5000; i++) check1({$urandom, $urandom}, {$urandom, $urandom});
    for (int a = 0; a < (1 << W2); a += 7)
      for (int b = 0; b < (1 << W2); b += 61) check2(W2'(a), W2'(b));
    check2('1, W2'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
