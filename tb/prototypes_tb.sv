// prototypes_tb: the array configurations built as test chips, run as
// workloads of the RTL.
//  * 8x8 2M multiplier: exhaustive, all 65536 operand pairs.
//  * 16x16 2M multiplier: 20000 random pairs plus corners.
//  * 8-by-16 bit-convolver array (N = 16 bit X, M = 8 bit Y): random pairs.
//  * 64x64 2M multiplier: random pairs (the size expected to fit a finer
//    process).
//  * 2x4 logic-test array (labc M = 2, N = 4) with every boundary input
//    reachable: all 2^6 operand values times all 4 carry-in values, checked
//    with x*y + |cin1| + |cin2| = sum1 + sum2 + 2^6 * (|cout1| + |cout2|).
//  * 3x32 speed-test strip (labc M = 3, N = 32) with all inputs tied to 0:
//    every column output and far-end carry must be 0.
module prototypes_tb;
  int checks = 0, failures = 0;

  logic [7:0]   x8, y8;    logic [15:0]  a8, b8, p8;    logic v8;
  logic [15:0]  x16, y16;  logic [31:0]  a16, b16, p16; logic v16;
  logic [15:0]  xr;        logic [7:0]   yr;            logic [23:0] ar, br, pr; logic vr;
  logic [63:0]  x64, y64;  logic [127:0] a64, b64, p64; logic v64;
  logic [3:0]   xl;        logic [1:0]   yl;            logic [0:0] cl1, cl2, ol1, ol2;
  logic [5:0]   sl1, sl2;
  logic [94:0]  ss1, ss2;  logic [14:0]  os1, os2;

  mult2m #(.M(8),  .N(8))  d8   (.clk(1'b0), .rst_n(1'b1), .in_valid(1'b1), .x(x8),  .y(y8),
                                 .out_valid(v8),  .cs_sum1(a8),  .cs_sum2(b8),  .product(p8));
  mult2m #(.M(16), .N(16)) d16  (.clk(1'b0), .rst_n(1'b1), .in_valid(1'b1), .x(x16), .y(y16),
                                 .out_valid(v16), .cs_sum1(a16), .cs_sum2(b16), .product(p16));
  mult2m #(.M(8),  .N(16)) drect(.clk(1'b0), .rst_n(1'b1), .in_valid(1'b1), .x(xr),  .y(yr),
                                 .out_valid(vr),  .cs_sum1(ar),  .cs_sum2(br),  .product(pr));
  mult2m #(.M(64), .N(64)) d64  (.clk(1'b0), .rst_n(1'b1), .in_valid(1'b1), .x(x64), .y(y64),
                                 .out_valid(v64), .cs_sum1(a64), .cs_sum2(b64), .product(p64));
  labc #(.M(2), .N(4))   dlog (.clk(1'b0), .x(xl), .y(yl), .cin1(cl1), .cin2(cl2),
                               .sum1(sl1), .sum2(sl2), .cout1(ol1), .cout2(ol2));
  labc #(.M(3), .N(32))  dspd (.clk(1'b0), .x('0), .y('0), .cin1('0), .cin2('0),
                               .sum1(ss1), .sum2(ss2), .cout1(os1), .cout2(os2));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [255:0] got, input logic [255:0] want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v); #1;
      expect_eq(256'(p8), 256'(x8) * 256'(y8), "8x8");
    end
    for (int i = 0; i < 20000; i++) begin
      x16 = 16'($urandom); y16 = 16'($urandom);
      xr = 16'($urandom);  yr = 8'($urandom);
      if (i == 0) begin x16 = '1; y16 = '1; xr = '1; yr = '1; end
      #1;
      expect_eq(256'(p16), 256'(x16) * 256'(y16), "16x16");
      expect_eq(256'(pr),  256'(xr) * 256'(yr),   "8-by-16 array");
    end
    for (int i = 0; i < 5000; i++) begin
      x64 = {$urandom, $urandom}; y64 = {$urandom, $urandom};
      if (i == 0) begin x64 = '1; y64 = '1; end
      #1;
      expect_eq(256'(p64), 256'(x64) * 256'(y64), "64x64");
      expect_eq(256'(a64) + 256'(b64), 256'(x64) * 256'(y64), "64x64 carry-save pair");
    end
    for (int v = 0; v < 256; v++) begin
      {xl, yl, cl1, cl2} = 8'(v); #1;
      expect_eq(256'(sl1) + 256'(sl2) + (256'(int'(ol1) + int'(ol2)) << 6),
                256'(xl) * 256'(yl) + 256'(int'(cl1) + int'(cl2)), "2x4 logic-test array");
    end
    #1;
    expect_eq(256'({ss1, ss2, os1, os2}), 0, "3x32 speed-test strip, inputs 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
