// tb_bch_chien: checks the Chien search.
//
// Lambda(x) = c * prod (1 + alpha^p x) over a random set of 0..10 error
// positions p below 208 is built with reference arithmetic (c a random
// non-zero scale). The search over len = 208 positions must mark exactly
// those positions, count them, and take len cycles. A run with a shorter len
// must ignore errors beyond it.
module tb_bch_chien;
  import bch_ref_pkg::*;

  localparam int unsigned M = 8, T = 10, PRIM = 'h11D, L = 208;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic         start, busy, done;
  logic [M-1:0] lambda [0:T];
  logic [7:0]   len, nroots;
  logic [L-1:0] err_mask;

  bch_chien dut (.*);

  initial begin
    logic [L-1:0] expv;
    int unsigned c [0:T];
    int w, cyc, cnt;
    start = 0; len = 8'(L);
    foreach (lambda[i]) lambda[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 24; n++) begin
      w = n % (T + 1);
      len = (n == 23) ? 8'd100 : 8'(L);
      expv = '0;
      for (int e = 0; e < w; e++) begin
        int p;
        do p = $urandom_range(L - 1); while (expv[p]);
        expv[p] = 1'b1;
      end
      for (int i = 0; i <= T; i++) c[i] = 0;
      c[0] = $urandom_range(255, 1);
      for (int p = 0; p < L; p++) if (expv[p]) begin
        int unsigned x;
        x = gf_exp(p, M, PRIM);
        for (int i = T; i >= 1; i--) c[i] = c[i] ^ gf_mul(c[i-1], x, M, PRIM);
      end
      foreach (lambda[i]) lambda[i] = M'(c[i]);
      if (n == 23) expv = expv & ((L'(1) << 100) - 1);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      cnt = $countones(expv);
      check(err_mask == expv, $sformatf("pattern %0d: error positions", n));
      check(int'(nroots) == cnt, $sformatf("pattern %0d: %0d roots, expected %0d", n, nroots, cnt));
      check(cyc == int'(len) + 1, $sformatf("took %0d cycles", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
