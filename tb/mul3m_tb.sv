// mul3m_tb: self-check of the recursive 3M core.
// Instances of several sizes (N = 3 base case, 4, 8 exhaustive; 5, 13 and
// the default 32 random) are compared with the simulator's multiply: the
// carry-save pair must add up to x*y modulo 2^(2N). Pipelined N = 8 and
// N = 32 instances get a new random pair every clock; each result must
// appear exactly mul3m_latency(N) cycles later (6 and 10 cycles).
module mul3m_tb;
  import mult_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  xp8, yp8;  logic [15:0] ap8, bp8;
  logic [31:0] xp, yp;    logic [63:0] ap, bp;
  mul3m #(.N(8), .PIPELINE(1'b1)) dp8 (.clk(clk), .x(xp8), .y(yp8), .p1(ap8), .p2(bp8));
  mul3m #(.PIPELINE(1'b1))        dp  (.clk(clk), .x(xp),  .y(yp),  .p1(ap),  .p2(bp));

  logic [2:0]  x3, y3;   logic [5:0]  a3, b3;
  logic [3:0]  x4, y4;   logic [7:0]  a4, b4;
  logic [7:0]  x8, y8;   logic [15:0] a8, b8;
  logic [4:0]  x5, y5;   logic [9:0]  a5, b5;
  logic [12:0] xd, yd;   logic [25:0] ad, bd;
  logic [31:0] xw, yw;   logic [63:0] aw, bw;

  mul3m #(.N(3))  d3  (.clk(clk), .x(x3), .y(y3), .p1(a3), .p2(b3));
  mul3m #(.N(4))  d4  (.clk(clk), .x(x4), .y(y4), .p1(a4), .p2(b4));
  mul3m #(.N(8))  d8  (.clk(clk), .x(x8), .y(y8), .p1(a8), .p2(b8));
  mul3m #(.N(5))  d5  (.clk(clk), .x(x5), .y(y5), .p1(a5), .p2(b5));
  mul3m #(.N(13)) d13 (.clk(clk), .x(xd), .y(yd), .p1(ad), .p2(bd));
  mul3m           dw  (.clk(clk), .x(xw), .y(yw), .p1(aw), .p2(bw));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  initial begin
    for (int v = 0; v < 64; v++) begin
      {x3, y3} = 6'(v); #1;
      expect_eq(64'(6'(a3 + b3)), 64'(x3) * 64'(y3), "N=3");
    end
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v); #1;
      expect_eq(64'(8'(a4 + b4)), 64'(x4) * 64'(y4), "N=4");
    end
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v); #1;
      expect_eq(64'(16'(a8 + b8)), 64'(x8) * 64'(y8), "N=8");
    end
    for (int i = 0; i < 5000; i++) begin
      x5 = 5'($urandom); y5 = 5'($urandom);
      xd = 13'($urandom); yd = 13'($urandom);
      xw = $urandom; yw = $urandom;
      if (i == 0) begin x5 = '1; y5 = '1; xd = '1; yd = '1; xw = '1; yw = '1; end
      #1;
      expect_eq(64'(10'(a5 + b5)), 64'(x5) * 64'(y5), "N=5");
      expect_eq(64'(26'(ad + bd)), 64'(xd) * 64'(yd), "N=13");
      expect_eq(aw + bw, 64'(xw) * 64'(yw), "N=32");
    end
    // Pipelined streams.
    begin
      logic [15:0] q8 [$];
      logic [63:0] q32 [$];
      expect_eq(64'(mul3m_latency(8)), 6, "latency formula N=8");
      expect_eq(64'(mul3m_latency(32)), 10, "latency formula N=32");
      @(negedge clk);
      for (int i = 0; i < 1000; i++) begin
        xp8 = 8'($urandom); yp8 = 8'($urandom); xp = $urandom; yp = $urandom;
        q8.push_back(16'(xp8) * 16'(yp8));
        q32.push_back(64'(xp) * 64'(yp));
        @(negedge clk);
        if (q8.size() >= 6)  expect_eq(64'(16'(ap8 + bp8)), 64'(q8.pop_front()), "N=8 pipelined, 6 cycles");
        if (q32.size() >= 10) expect_eq(ap + bp, q32.pop_front(), "N=32 pipelined, 10 cycles");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
