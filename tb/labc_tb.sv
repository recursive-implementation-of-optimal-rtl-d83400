// labc_tb: self-check of the linear array of bit-convolvers.
// References are computed with the simulator's integer multiply.
//  * 8x8 array: all 65536 operand pairs, carry-ins zero; sum1+sum2 must be
//    x*y and nothing may leave the last column.
//  * Default 32x32 array: random operands, first with zero carry-ins, then
//    with random boundary carries, where
//      x*y + |cin1| + |cin2| = sum1 + sum2 + 2^(M+N) * (|cout1| + |cout2|)
//    (|v| counts the ones of v) must hold.
//  * 5x16 array (M != N): random operands and boundary carries, same rule.
//  * Pipelined 8x8 array: a new operand pair every clock; the carry-save
//    result of each pair must appear exactly log2(8/2) = 2 cycles later.
module labc_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // 8x8
  logic [7:0]   xa, ya;
  logic [2:0]   ca1, ca2, oa1, oa2;
  logic [15:0]  sa1, sa2;
  // 32x32 (default)
  logic [31:0]  xb, yb;
  logic [14:0]  cb1, cb2, ob1, ob2;
  logic [63:0]  sb1, sb2;
  // M=5, N=16
  logic [15:0]  xc;
  logic [4:0]   yc;
  logic [6:0]   cc1, cc2, oc1, oc2;
  logic [20:0]  sc1, sc2;
  // pipelined 8x8
  logic [7:0]   xp, yp;
  logic [2:0]   op1, op2;
  logic [15:0]  sp1, sp2;

  labc #(.M(8), .N(8)) dut_a (.clk(clk), .x(xa), .y(ya), .cin1(ca1), .cin2(ca2),
                              .sum1(sa1), .sum2(sa2), .cout1(oa1), .cout2(oa2));
  labc                 dut_b (.clk(clk), .x(xb), .y(yb), .cin1(cb1), .cin2(cb2),
                              .sum1(sb1), .sum2(sb2), .cout1(ob1), .cout2(ob2));
  labc #(.M(5), .N(16)) dut_c (.clk(clk), .x(xc), .y(yc), .cin1(cc1), .cin2(cc2),
                               .sum1(sc1), .sum2(sc2), .cout1(oc1), .cout2(oc2));
  labc #(.M(8), .N(8), .PIPELINE(1'b1)) dut_p (.clk(clk), .x(xp), .y(yp), .cin1('0), .cin2('0),
                                               .sum1(sp1), .sum2(sp2), .cout1(op1), .cout2(op2));

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

  initial begin
    logic [15:0] hist [$];
    ca1 = '0; ca2 = '0;
    for (int v = 0; v < 65536; v++) begin
      {xa, ya} = 16'(v);
      #1;
      expect_eq(128'(sa1) + 128'(sa2), 128'(xa) * 128'(ya), "8x8 product");
      if (oa1 != '0 || oa2 != '0) expect_eq(128'({oa1, oa2}), 0, "8x8 far-end carry");
    end
    for (int i = 0; i < 4000; i++) begin
      xb = $urandom; yb = $urandom;
      if (i == 0) begin xb = '1; yb = '1; end
      cb1 = (i < 2000) ? '0 : 15'($urandom);
      cb2 = (i < 2000) ? '0 : 15'($urandom);
      #1;
      expect_eq(128'(sb1) + 128'(sb2) + (128'($countones(ob1) + $countones(ob2)) << 64),
                128'(xb) * 128'(yb) + 128'($countones(cb1) + $countones(cb2)), "32x32");
      xc = 16'($urandom); yc = 5'($urandom); cc1 = 7'($urandom); cc2 = 7'($urandom);
      #1;
      expect_eq(128'(sc1) + 128'(sc2) + (128'($countones(oc1) + $countones(oc2)) << 21),
                128'(xc) * 128'(yc) + 128'($countones(cc1) + $countones(cc2)), "5x16");
    end
    // Pipelined stream.
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      xp = 8'($urandom); yp = 8'($urandom);
      hist.push_back(16'(xp) * 16'(yp));
      @(negedge clk);
      if (hist.size() >= 2) begin
        expect_eq(128'(sp1) + 128'(sp2), 128'(hist.pop_front()), "pipelined 8x8 after 2 cycles");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
