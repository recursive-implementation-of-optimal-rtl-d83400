// bit_convolver_tb: self-check of one multiplier column.
// Three combinational instances (N = 4, 8 and the default 32) get random
// operand bits and random carry vectors; each must satisfy the column
// invariant
//   sum_i x[i]&yr[i] + |C1| + |C2| = s1 + s2 + 2*(|D1| + |D2|)
// where |V| counts the ones of V. The N = 4 instance is also checked
// exhaustively. A pipelined N = 8 instance (2 tree levels) is held at each
// input for a few cycles: its sum outputs must not show the new column before
// the second clock edge, and must satisfy the invariant after it. (Carries
// into a pipelined column are only checked once the inputs have been held
// long enough, since a carry for tree level L is expected L-1 cycles late.)
module bit_convolver_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // N = 4
  logic [3:0]  x4, y4;
  logic [0:0]  c14, c24, d14, d24;
  logic        s14, s24;
  // N = 8
  logic [7:0]  x8, y8;
  logic [2:0]  c18, c28, d18, d28;
  logic        s18, s28;
  // N = 32 (default)
  logic [31:0] x32, y32;
  logic [14:0] c132, c232, d132, d232;
  logic        s132, s232;
  // N = 8, pipelined
  logic [2:0]  pd1, pd2;
  logic        ps1, ps2;

  bit_convolver #(.N(4)) dut4 (.clk(clk), .x(x4), .yr(y4), .c1(c14), .c2(c24),
                               .s1(s14), .s2(s24), .d1(d14), .d2(d24));
  bit_convolver #(.N(8)) dut8 (.clk(clk), .x(x8), .yr(y8), .c1(c18), .c2(c28),
                               .s1(s18), .s2(s28), .d1(d18), .d2(d28));
  bit_convolver          dut32 (.clk(clk), .x(x32), .yr(y32), .c1(c132), .c2(c232),
                                .s1(s132), .s2(s232), .d1(d132), .d2(d232));
  bit_convolver #(.N(8), .PIPELINE(1'b1)) dutp (.clk(clk), .x(x8), .yr(y8), .c1(c18), .c2(c28),
                                                .s1(ps1), .s2(ps2), .d1(pd1), .d2(pd2));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lhs(input logic [31:0] x, input logic [31:0] yr,
                             input logic [31:0] c1, input logic [31:0] c2);
    return $countones(x & yr) + $countones(c1) + $countones(c2);
  endfunction

  function automatic int rhs(input logic s1, input logic s2,
                             input logic [31:0] d1, input logic [31:0] d2);
    return int'(s1) + int'(s2) + 2 * ($countones(d1) + $countones(d2));
  endfunction

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    // Exhaustive N = 4.
    for (int v = 0; v < 1024; v++) begin
      {x4, y4, c14, c24} = 10'(v);
      #1;
      expect_eq(rhs(s14, s24, 32'(d14), 32'(d24)),
                lhs(32'(x4), 32'(y4), 32'(c14), 32'(c24)), "N=4");
    end
    // Random N = 8 and N = 32, plus the all-ones extreme.
    for (int i = 0; i < 3000; i++) begin
      x8 = 8'($urandom); y8 = 8'($urandom); c18 = 3'($urandom); c28 = 3'($urandom);
      x32 = $urandom; y32 = $urandom; c132 = 15'($urandom); c232 = 15'($urandom);
      if (i == 0) begin
        x8 = '1; y8 = '1; c18 = '1; c28 = '1; x32 = '1; y32 = '1; c132 = '1; c232 = '1;
      end
      #1;
      expect_eq(rhs(s18, s28, 32'(d18), 32'(d28)),
                lhs(32'(x8), 32'(y8), 32'(c18), 32'(c28)), "N=8");
      expect_eq(rhs(s132, s232, 32'(d132), 32'(d232)),
                lhs(x32, y32, 32'(c132), 32'(c232)), "N=32");
    end
    // Pipelined N = 8: latency of log2(8/2) = 2 cycles.
    @(negedge clk);
    x8 = '0; y8 = '0; c18 = '0; c28 = '0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      x8 = 8'($urandom); y8 = 8'($urandom); c18 = 3'($urandom); c28 = 3'($urandom);
      if (i == 0) begin x8 = '1; y8 = '1; c18 = '0; c28 = '0; end
      @(negedge clk);  // one edge: the root register still holds the old column
      if (i == 0) expect_eq(int'(ps1) + int'(ps2), 0, "pipelined sums after 1 edge");
      @(negedge clk);  // two edges: result present
      expect_eq(rhs(ps1, ps2, 32'(pd1), 32'(pd2)),
                lhs(32'(x8), 32'(y8), 32'(c18), 32'(c28)), "N=8 pipelined");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
