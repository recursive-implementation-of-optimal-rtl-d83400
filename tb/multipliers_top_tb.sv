// multipliers_top_tb: end-to-end test of both multipliers in the top.
//  * Default top (2M 32x32 and 3M 32x32, combinational): corner and random
//    operands, binary products and carry-save pairs checked against the
//    simulator's multiply.
//  * Top with pipelined 16x16 2M and 3M multipliers: random streams with
//    bubbles and one reset in the middle; each 2M result must appear
//    log2(16/2) = 3 cycles after its operands, each 3M result
//    mul3m_latency(16) = 8 cycles after, flagged by the out_valid outputs.
// Mechanisms counted, each must occur at least once: carries handed between
// bit-convolver columns, 2M and 3M results on consecutive cycles, bubbles through the
// valid pipeline, the valid pipeline cleared by reset, and a 3M carry-save
// pair whose two halves overflow 2^(2N) (the wrap-around the subtractions of
// the combining adders leave, removed by the final addition).
module multipliers_top_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;
  int n_col_carry = 0, n_back_to_back = 0, n_b2b3 = 0, n_bubble = 0, n_reset_clear = 0, n_wrap = 0;

  // Default top.
  logic [31:0] x2a, y2a, x3a, y3a;
  logic [63:0] c1a, c2a, p2a, d1a, d2a, p3a;
  logic        va, va3;
  multipliers_top dut_a (
    .clk(clk), .rst_n(rst_n),
    .m2_in_valid(1'b1), .m2_x(x2a), .m2_y(y2a), .m2_out_valid(va),
    .m2_cs_sum1(c1a), .m2_cs_sum2(c2a), .m2_product(p2a),
    .m3_in_valid(1'b1), .m3_x(x3a), .m3_y(y3a), .m3_out_valid(va3), .m3_cs_sum1(d1a), .m3_cs_sum2(d2a), .m3_product(p3a));

  // Pipelined 2M, small 3M.
  logic [15:0] x2b, y2b, x3b, y3b;
  logic [31:0] c1b, c2b, p2b, d1b, d2b, p3b;
  logic        ivb, vb, iv3, vb3;
  multipliers_top #(.M(16), .N(16), .PIPELINE(1'b1), .N3(16), .PIPELINE3(1'b1)) dut_b (
    .clk(clk), .rst_n(rst_n),
    .m2_in_valid(ivb), .m2_x(x2b), .m2_y(y2b), .m2_out_valid(vb),
    .m2_cs_sum1(c1b), .m2_cs_sum2(c2b), .m2_product(p2b),
    .m3_in_valid(iv3), .m3_x(x3b), .m3_y(y3b), .m3_out_valid(vb3), .m3_cs_sum1(d1b), .m3_cs_sum2(d2b), .m3_product(p3b));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  task automatic run_a(input logic [31:0] x2, input logic [31:0] y2,
                       input logic [31:0] x3, input logic [31:0] y3);
    logic seen;
    x2a = x2; y2a = y2; x3a = x3; y3a = y3;
    #1;
    expect_eq(128'(p2a), 128'(x2) * 128'(y2), "2M 32x32 product");
    expect_eq(128'(c1a) + 128'(c2a), 128'(x2) * 128'(y2), "2M 32x32 carry-save pair");
    expect_eq(128'({va, va3}), 3, "combinational out_valid");
    expect_eq(128'(p3a), 128'(x3) * 128'(y3), "3M 32x32 product");
    expect_eq(128'(64'(d1a + d2a)), 128'(x3) * 128'(y3), "3M 32x32 carry-save pair");
    if (128'(d1a) + 128'(d2a) >= (128'(1) << 64)) n_wrap++;
    seen = 1'b0;
    for (int k = 1; k < 64; k++)
      if (dut_a.u_mult2m.u_labc.chain1[k] != '0 || dut_a.u_mult2m.u_labc.chain2[k] != '0)
        seen = 1'b1;
    if (seen) n_col_carry++;
  endtask

  logic [32:0] q [$];
  logic [32:0] q3 [$];
  logic        prev_v = 1'b0, prev_v3 = 1'b0;

  initial begin
    rst_n = 1'b0;
    ivb = 1'b0; iv3 = 1'b0; x2b = '0; y2b = '0; x3b = '0; y3b = '0;
    run_a('0, '0, '0, '0);
    run_a('1, '1, '1, '1);
    run_a('1, 32'd1, 32'd1, '1);
    run_a(32'h8000_0000, 32'h8000_0001, 32'hFFFF_0000, 32'h0000_FFFF);
    for (int i = 0; i < 5000; i++) run_a($urandom, $urandom, $urandom, $urandom);

    repeat (2) @(negedge clk);
    expect_eq(128'({vb, vb3}), 0, "out_valid low in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      if (i == 1000) begin
        ivb = 1'b1; iv3 = 1'b1;
        @(negedge clk);
        rst_n = 1'b0;
        @(negedge clk);
        checks++;
        if (vb || vb3) begin failures++; $display("FAIL reset did not clear out_valid"); end
        else n_reset_clear++;
        rst_n = 1'b1;
        ivb = 1'b0; iv3 = 1'b0;
        q.delete(); q3.delete();
        repeat (9) @(negedge clk);
        prev_v = 1'b0; prev_v3 = 1'b0;
      end
      ivb = ($urandom % 4) != 0;
      x2b = 16'($urandom); y2b = 16'($urandom);
      x3b = 16'($urandom); y3b = 16'($urandom);
      iv3 = ($urandom % 3) != 0;
      q.push_back({ivb, 32'(x2b) * 32'(y2b)});
      q3.push_back({iv3, 32'(x3b) * 32'(y3b)});
      @(negedge clk);
      if (q3.size() >= 8) begin
        logic [32:0] e3;
        e3 = q3.pop_front();
        expect_eq(128'(vb3), 128'(e3[32]), "3M out_valid after 8 cycles");
        if (e3[32]) begin
          expect_eq(128'(p3b), 128'(e3[31:0]), "3M pipelined product");
          if (prev_v3) n_b2b3++;
        end
        prev_v3 = e3[32];
      end
      if (q.size() >= 3) begin
        logic [32:0] e;
        e = q.pop_front();
        expect_eq(128'(vb), 128'(e[32]), "2M out_valid after 3 cycles");
        if (e[32]) begin
          expect_eq(128'(p2b), 128'(e[31:0]), "2M pipelined product");
          expect_eq(128'(c1b) + 128'(c2b), 128'(e[31:0]), "2M pipelined carry-save pair");
          if (prev_v) n_back_to_back++;
        end else n_bubble++;
        prev_v = e[32];
      end
    end

    $display("mechanisms: 3M back-to-back=%0d", n_b2b3);
    if (n_b2b3 == 0) begin failures++; $display("FAIL no 3M back-to-back results"); end
    $display("mechanisms: column carries=%0d back-to-back=%0d bubbles=%0d reset clears=%0d 3M pair wraps=%0d",
             n_col_carry, n_back_to_back, n_bubble, n_reset_clear, n_wrap);
    if (n_col_carry == 0)    begin failures++; $display("FAIL no column carry seen"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back results"); end
    if (n_bubble == 0)       begin failures++; $display("FAIL no bubble seen"); end
    if (n_reset_clear == 0)  begin failures++; $display("FAIL no reset clear seen"); end
    if (n_wrap == 0)         begin failures++; $display("FAIL no 3M pair wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
