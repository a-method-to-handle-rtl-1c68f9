// tb_bch_encoder: checks the helper-data (parity) computation.
//
// The generator of the default code (GF(2^8), t = 10, degree 76) is built in
// the testbench from the reference minimal polynomials. For random 128-bit
// messages, and for all-zero and all-one messages, the remainder must equal
// (msg * x^76) mod g(x) from reference long division, msg*x^76 + remainder
// must be divisible by g(x), and the encoder must take K = 128 cycles.
module tb_bch_encoder;
  import bch_ref_pkg::*;

  localparam int unsigned M = 8, T = 10, K = 128, RW = T * M;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic          start, busy, done;
  logic [K-1:0]  msg;
  logic [RW:0]   gpoly;
  logic [6:0]    gdeg;
  logic [RW-1:0] rem;

  bch_encoder dut (.*);

  initial begin
    bigpoly_t g, expv, cw;
    int unsigned seen [$];
    int cyc;
    start = 0; msg = '0;
    g = 1;
    for (int j = 1; j <= 2 * T - 1; j += 2) begin
      int unsigned mp;
      bit dup;
      mp = minpoly(j, M, 'h11D);
      dup = 0;
      foreach (seen[s]) if (seen[s] == mp) dup = 1;
      if (!dup) begin seen.push_back(mp); g = pmul(g, bigpoly_t'(mp)); end
    end
    gpoly = g[RW:0];
    gdeg  = 7'(deg(g));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 12; n++) begin
      if (n == 0)      msg = '0;
      else if (n == 1) msg = '1;
      else for (int w = 0; w < K / 32; w++) msg[w*32 +: 32] = $urandom;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      expv = pmod(bigpoly_t'(msg) << gdeg, g);
      check(rem == expv[RW-1:0], $sformatf("remainder of message %0d", n));
      cw = (bigpoly_t'(msg) << gdeg) | bigpoly_t'(rem);
      check(pmod(cw, g) == '0, $sformatf("codeword %0d divisible by g", n));
      check(cyc == K + 1, $sformatf("encode took %0d cycles", cyc));
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
