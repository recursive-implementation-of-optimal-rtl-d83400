// mult2m_tb: end-to-end test of the 2M multiplier.
//  * Default instance (32x32, combinational): corner operands and random
//    pairs; product and carry-save pair checked against x*y.
//  * Pipelined 16x16 instance (3 tree levels) and pipelined 8x4 instance
//    (N = 4, one tree level): a random valid stream with bubbles; every result
//    must appear exactly log2(N/2) cycles after its operands with out_valid
//    set, and out_valid must stay low for bubbles and after reset.
// Mechanisms counted, each of which must occur at least once: carries handed
// from one column to the next, results delivered on consecutive cycles (period
// 1), bubbles passed through the valid pipeline, and the valid pipeline being
// cleared by reset.
module mult2m_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;
  int n_col_carry = 0, n_back_to_back = 0, n_bubble = 0, n_reset_clear = 0;

  // default (combinational)
  logic [31:0] x0, y0;
  logic [63:0] a0, b0, p0;
  logic        v0;
  mult2m dut0 (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x0), .y(y0),
                   .out_valid(v0), .cs_sum1(a0), .cs_sum2(b0), .product(p0));

  // pipelined 16x16
  logic [15:0] x1, y1;
  logic        iv1, v1;
  logic [31:0] a1, b1, p1;
  mult2m #(.M(16), .N(16), .PIPELINE(1'b1)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(iv1), .x(x1), .y(y1),
    .out_valid(v1), .cs_sum1(a1), .cs_sum2(b1), .product(p1));

  // pipelined, M = 8, N = 4
  logic [3:0]  x2;
  logic [7:0]  y2;
  logic        v2;
  logic [11:0] a2, b2, p2;
  mult2m #(.M(8), .N(4), .PIPELINE(1'b1)) dut2 (
    .clk(clk), .rst_n(rst_n), .in_valid(iv1), .x(x2), .y(y2),
    .out_valid(v2), .cs_sum1(a2), .cs_sum2(b2), .product(p2));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [127:0] got, input logic [127:0] want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  task automatic check_comb(input logic [31:0] x, input logic [31:0] y);
    logic carry_seen;
    x0 = x; y0 = y;
    #1;
    expect_eq(128'(p0), 128'(x) * 128'(y), "32x32 product");
    expect_eq(128'(a0) + 128'(b0), 128'(x) * 128'(y), "32x32 carry-save pair");
    expect_eq(128'(v0), 1, "32x32 out_valid");
    carry_seen = 1'b0;
    for (int k = 1; k < 64; k++)
      if (dut0.u_labc.chain1[k] != '0 || dut0.u_labc.chain2[k] != '0) carry_seen = 1'b1;
    if (carry_seen) n_col_carry++;
  endtask

  // Expected-result queues for the pipelined instances; entry = {valid, x*y}.
  logic [32:0] q1 [$];
  logic [12:0] q2 [$];
  logic        prev_v1 = 1'b0;

  initial begin
    rst_n = 1'b0;
    iv1 = 1'b0; x1 = '0; y1 = '0; x2 = '0; y2 = '0;
    // Combinational instance.
    check_comb('0, '0);
    check_comb('1, '1);
    check_comb('1, 32'd1);
    check_comb(32'h8000_0000, 32'h8000_0000);
    check_comb(32'hAAAA_AAAA, 32'h5555_5555);
    for (int i = 0; i < 20000; i++) check_comb($urandom, $urandom);

    // Pipelined instances: valid register must be clear under reset.
    repeat (2) @(negedge clk);
    expect_eq(128'({v1, v2}), 0, "out_valid low in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      // Inject a reset in the middle of the stream once.
      if (i == 1500) begin
        iv1 = 1'b1;
        @(negedge clk);
        rst_n = 1'b0;
        @(negedge clk);
        checks++;
        if (v1 || v2) begin
          failures++;
          $display("FAIL out_valid not cleared by reset");
        end else n_reset_clear++;
        rst_n = 1'b1;
        q1.delete(); q2.delete();
        iv1 = 1'b0;
        @(negedge clk);
        @(negedge clk);
        @(negedge clk);
      end
      iv1 = ($urandom % 4) != 0;
      x1 = 16'($urandom); y1 = 16'($urandom);
      x2 = 4'($urandom);  y2 = 8'($urandom);
      q1.push_back({iv1, 32'(x1) * 32'(y1)});
      q2.push_back({iv1, 12'(x2) * 12'(y2)});
      @(negedge clk);
      if (q1.size() >= 3) begin
        logic [32:0] e1;
        e1 = q1.pop_front();
        expect_eq(128'(v1), 128'(e1[32]), "16x16 out_valid after 3 cycles");
        if (e1[32]) begin
          expect_eq(128'(p1), 128'(e1[31:0]), "16x16 pipelined product");
          if (prev_v1) n_back_to_back++;
        end else n_bubble++;
        prev_v1 = e1[32];
      end
      if (q2.size() >= 1) begin
        logic [12:0] e2;
        e2 = q2.pop_front();
        expect_eq(128'(v2), 128'(e2[12]), "8x4 out_valid after 1 cycle");
        if (e2[12]) expect_eq(128'(p2), 128'(e2[11:0]), "8x4 pipelined product");
      end
    end

    $display("mechanisms: column carries=%0d back-to-back=%0d bubbles=%0d reset clears=%0d",
             n_col_carry, n_back_to_back, n_bubble, n_reset_clear);
    if (n_col_carry == 0)    begin failures++; $display("FAIL no column carry seen"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back results"); end
    if (n_bubble == 0)       begin failures++; $display("FAIL no bubble seen"); end
    if (n_reset_clear == 0)  begin failures++; $display("FAIL no reset clear seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
