// multipliers_full_tb: the top at its default sizes (32x32 2M multiplier,
// combinational, and 32x32 3M multiplier) taken through complete
// multiplications: extreme operands, then random pairs. Both products and
// their carry-save pairs are compared with the simulator's 64-bit multiply.
module multipliers_full_tb;
  logic        clk = 1'b0;
  logic [31:0] x, y;
  logic [63:0] c1, c2, p2, d1, d2, p3;
  logic        v, v3;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  multipliers_top dut (
    .clk(clk), .rst_n(1'b1),
    .m2_in_valid(1'b1), .m2_x(x), .m2_y(y), .m2_out_valid(v),
    .m2_cs_sum1(c1), .m2_cs_sum2(c2), .m2_product(p2),
    .m3_in_valid(1'b1), .m3_x(y), .m3_y(x), .m3_out_valid(v3), .m3_cs_sum1(d1), .m3_cs_sum2(d2), .m3_product(p3));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] xi, input logic [31:0] yi);
    logic [63:0] want;
    x = xi; y = yi;
    @(negedge clk);
    want = 64'(xi) * 64'(yi);
    checks += 2;
    if (p2 != want || c1 + c2 != want || !v) begin
      failures++;
      $display("FAIL 2M %h * %h: product %h, pair %h + %h, want %h", xi, yi, p2, c1, c2, want);
    end
    if (p3 != want || d1 + d2 != want || !v3) begin
      failures++;
      $display("FAIL 3M %h * %h: product %h, pair %h + %h, want %h", yi, xi, p3, d1, d2, want);
    end
  endtask

  initial begin
    run('0, '0);
    run('1, '1);
    run('1, 32'd1);
    run(32'd1, '1);
    run(32'h8000_0000, 32'h8000_0001);
    for (int i = 0; i < 5000; i++) run($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
