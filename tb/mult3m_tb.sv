// mult3m_tb: self-check of the complete 3M multiplier (core plus final
// carry-lookahead adder) at the default 32x32 size and at 16x16: corner
// operands and random pairs, product compared with the simulator's multiply.
// A pipelined 16x16 instance (latency 8) gets a random stream with bubbles;
// out_valid and the product must appear exactly 8 cycles after the operands,
// and out_valid must be low under reset.
module mult3m_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic        v, v2, ivp, vp;
  logic [15:0] xp, yp;
  logic [31:0] r1, r2, pp;

  logic [31:0] x, y;
  logic [63:0] s1, s2, p;
  logic [15:0] xs, ys;
  logic [31:0] t1, t2, q;

  mult3m           dut  (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x), .y(y), .out_valid(v),
                         .cs_sum1(s1), .cs_sum2(s2), .product(p));
  mult3m #(.N(16)) dut2 (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(xs), .y(ys), .out_valid(v2),
                         .cs_sum1(t1), .cs_sum2(t2), .product(q));
  mult3m #(.N(16), .PIPELINE(1'b1)) dutp (.clk(clk), .rst_n(rst_n), .in_valid(ivp), .x(xp), .y(yp),
                         .out_valid(vp), .cs_sum1(r1), .cs_sum2(r2), .product(pp));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] xi, input logic [31:0] yi);
    x = xi; y = yi; xs = xi[15:0]; ys = yi[15:0];
    #1;
    checks += 2;
    if (p != 64'(xi) * 64'(yi)) begin
      failures++;
      $display("FAIL 32x32 %h * %h = %h", xi, yi, p);
    end
    if (q != 32'(xi[15:0]) * 32'(yi[15:0])) begin
      failures++;
      $display("FAIL 16x16 %h * %h = %h", xi[15:0], yi[15:0], q);
    end
  endtask

  initial begin
    run('0, '0);
    run('1, '1);
    run('1, 32'd1);
    run(32'h8000_0000, 32'hFFFF_FFFF);
    run(32'h0001_FFFF, 32'hFFFF_0001);
    for (int i = 0; i < 10000; i++) run($urandom, $urandom);
    checks++;
    if (!v || !v2) begin failures++; $display("FAIL combinational out_valid"); end
    // Pipelined stream.
    ivp = 1'b0; xp = '0; yp = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (vp) begin failures++; $display("FAIL out_valid high in reset"); end
    rst_n = 1'b1;
    begin
      logic [32:0] qp [$];
      logic [32:0] e;
      for (int i = 0; i < 2000; i++) begin
        ivp = ($urandom % 3) != 0;
        xp = 16'($urandom); yp = 16'($urandom);
        qp.push_back({ivp, 32'(xp) * 32'(yp)});
        @(negedge clk);
        if (qp.size() >= 8) begin
          e = qp.pop_front();
          checks++;
          if (vp != e[32] || (e[32] && pp != e[31:0])) begin
            failures++;
            if (failures < 20) $display("FAIL pipelined: valid %0b product %h, want %0b %h", vp, pp, e[32], e[31:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
