// tb_bch_syndrome_div: checks the syndrome-polynomial divider.
//
// A small instance (GF(2^4), 11-bit word, no helper part) divides the
// received word 10001110111 by m_1 = x^4+x+1 and m_3 = x^4+x^3+x^2+x+1 and
// must give x^3+1 and x^3+x. The default instance (K = 128, helper up to 80
// bits) divides random identifiers with random helper lengths by random
// minimal polynomials of GF(2^8); the remainder must equal reference long
// division and the division must take K + hdeg cycles.
module tb_bch_syndrome_div;
  import bch_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        st4, busy4, done4;
  logic [10:0] id4;
  logic [7:0]  hp4;
  logic [3:0]  hd4;
  logic [4:0]  mp4;
  logic [2:0]  md4;
  logic [3:0]  rem4;
  bch_syndrome_div #(.M(4), .T(2), .K(11)) u4 (.clk, .rst_n, .start(st4),
    .id(id4), .helper(hp4), .hdeg(hd4), .mpoly(mp4), .mdeg(md4),
    .busy(busy4), .done(done4), .rem(rem4));

  logic         st8, busy8, done8;
  logic [127:0] id8;
  logic [79:0]  hp8;
  logic [6:0]   hd8;
  logic [8:0]   mp8;
  logic [3:0]   md8;
  logic [7:0]   rem8;
  bch_syndrome_div u8 (.clk, .rst_n, .start(st8),
    .id(id8), .helper(hp8), .hdeg(hd8), .mpoly(mp8), .mdeg(md8),
    .busy(busy8), .done(done8), .rem(rem8));

  initial begin
    bigpoly_t r, expv;
    int cyc;
    int unsigned mp;
    st4 = 0; st8 = 0; id4 = 11'b10001110111; hp4 = '0; hd4 = '0;
    id8 = '0; hp8 = '0; hd8 = '0; mp8 = '0; md8 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    mp4 = 5'b10011; md4 = 4;
    @(negedge clk) st4 = 1;
    @(negedge clk) st4 = 0;
    while (!done4) @(negedge clk);
    check(rem4 == 4'b1001, $sformatf("S_1(x) = %b", rem4));
    mp4 = 5'b11111; md4 = 4;
    @(negedge clk) st4 = 1;
    @(negedge clk) st4 = 0;
    while (!done4) @(negedge clk);
    check(rem4 == 4'b1010, $sformatf("S_3(x) = %b", rem4));

    for (int n = 0; n < 30; n++) begin
      for (int w = 0; w < 4; w++) id8[w*32 +: 32] = $urandom;
      hp8 = {$urandom, $urandom, $urandom};
      hd8 = 7'($urandom_range(80, 1));
      hp8 = hp8 & ((80'(1) << hd8) - 1);
      mp = minpoly($urandom_range(254, 1), 8, 'h11D);
      mp8 = 9'(mp); md8 = 4'(deg(bigpoly_t'(mp)));
      @(negedge clk) st8 = 1;
      @(negedge clk) st8 = 0;
      cyc = 1;
      while (!done8) begin @(negedge clk); cyc++; end
      r = (bigpoly_t'(id8) << hd8) | bigpoly_t'(hp8);
      expv = pmod(r, bigpoly_t'(mp));
      check(rem8 == expv[7:0], $sformatf("remainder %0d: %b vs %b", n, rem8, expv[7:0]));
      check(cyc == 128 + int'(hd8) + 1, $sformatf("division %0d took %0d cycles", n, cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
