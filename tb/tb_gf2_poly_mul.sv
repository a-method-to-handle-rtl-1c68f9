// tb_gf2_poly_mul: checks the generator-polynomial multiplier.
//
// GF(2^4), t = 2: m_1 * m_3 must give the BCH(15,7) generator
// x^8+x^7+x^6+x^4+1. GF(2^8), t = 10: the product of the distinct minimal
// polynomials m_1, m_3, ..., m_19 is built step by step and compared with a
// carry-less product after every step; each step must take M+1 cycles.
module tb_gf2_poly_mul;
  import bch_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       clr4, st4, busy4, done4;
  logic [4:0] op4;
  logic [8:0] prod4;
  logic [3:0] deg4;
  gf2_poly_mul #(.M(4), .RW(8)) u4 (.clk, .rst_n, .clear(clr4), .start(st4),
    .operand(op4), .busy(busy4), .done(done4), .prod(prod4), .deg(deg4));

  logic        clr8, st8, busy8, done8;
  logic [8:0]  op8;
  logic [80:0] prod8;
  logic [6:0]  deg8;
  gf2_poly_mul u8 (.clk, .rst_n, .clear(clr8), .start(st8),
    .operand(op8), .busy(busy8), .done(done8), .prod(prod8), .deg(deg8));

  initial begin
    bigpoly_t expv;
    int cyc, seen [$];
    clr4 = 0; st4 = 0; op4 = 0; clr8 = 0; st8 = 0; op8 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    @(negedge clk) clr4 = 1;
    @(negedge clk) clr4 = 0;
    for (int j = 1; j <= 3; j += 2) begin
      op4 = 5'(minpoly(j, 4, 'h13)); st4 = 1;
      @(negedge clk) st4 = 0;
      while (!done4) @(negedge clk);
    end
    check(prod4 == 9'h1D1, $sformatf("GF16 g = %b", prod4));
    check(deg4 == 8, "GF16 deg g");

    @(negedge clk) clr8 = 1;
    @(negedge clk) clr8 = 0;
    expv = 1;
    for (int j = 1; j <= 19; j += 2) begin
      int unsigned mp;
      bit dup;
      mp = minpoly(j, 8, 'h11D);
      dup = 0;
      foreach (seen[s]) if (seen[s] == int'(mp)) dup = 1;
      if (dup) continue;
      seen.push_back(mp);
      op8 = 9'(mp); st8 = 1;
      @(negedge clk) st8 = 0;
      cyc = 0;
      while (!done8) begin @(negedge clk); cyc++; end
      check(cyc == 9, $sformatf("multiply took %0d cycles", cyc));
      expv = pmul(expv, bigpoly_t'(mp));
      check(prod8 == expv[80:0], $sformatf("GF256 product after m_%0d", j));
      check(int'(deg8) == deg(expv), $sformatf("GF256 degree after m_%0d: %0d", j, deg8));
    end
    check(deg8 == 76, "t = 10 generator has degree 76");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
