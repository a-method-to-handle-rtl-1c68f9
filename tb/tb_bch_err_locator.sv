// tb_bch_err_locator: checks the Berlekamp-Massey error-locator block.
//
// For random error patterns of 0..T = 10 errors at positions 0..207 of the
// default GF(2^8) code, the syndromes S_j = sum over errors of alpha^(j*p)
// are computed by the reference package. The block must report the number of
// errors, Lambda must vanish at alpha^-p for every error position, must not
// vanish at any other position, and the run must take 2T*(2T+2)+1 cycles.
module tb_bch_err_locator;
  import bch_ref_pkg::*;

  localparam int unsigned M = 8, T = 10, PRIM = 'h11D, LEN = 208;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic         start, busy, done;
  logic [M-1:0] syn [1:2*T];
  logic [M-1:0] lambda [0:T];
  logic [4:0]   nerr;

  bch_err_locator dut (.*);

  // Lambda evaluated at alpha^-p with reference arithmetic.
  function automatic int unsigned lam_at(input int unsigned p);
    int unsigned x, pw, r;
    x = gf_exp((255 - (p % 255)) % 255, M, PRIM);
    pw = 1; r = 0;
    for (int i = 0; i <= T; i++) begin
      r = r ^ gf_mul(lambda[i], pw, M, PRIM);
      pw = gf_mul(pw, x, M, PRIM);
    end
    return r;
  endfunction

  initial begin
    bit err [LEN];
    int w, cyc, bad;
    start = 0;
    foreach (syn[j]) syn[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 25; n++) begin
      w = n % (T + 1);
      foreach (err[p]) err[p] = 0;
      for (int e = 0; e < w; e++) begin
        int p;
        do p = $urandom_range(LEN - 1); while (err[p]);
        err[p] = 1;
      end
      for (int j = 1; j <= 2 * T; j++) begin
        int unsigned s;
        s = 0;
        foreach (err[p]) if (err[p]) s = s ^ gf_exp((j * p) % 255, M, PRIM);
        syn[j] = M'(s);
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(int'(nerr) == w, $sformatf("pattern %0d: nerr %0d, expected %0d", n, nerr, w));
      bad = 0;
      foreach (err[p]) if ((lam_at(p) == 0) != err[p]) bad++;
      check(bad == 0, $sformatf("pattern %0d: %0d positions misjudged", n, bad));
      check(cyc == 2 * T * (2 * T + 2) + 1, $sformatf("took %0d cycles", cyc));
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
