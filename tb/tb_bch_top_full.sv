// tb_bch_top_full: the BCH engine at its default size (GF(2^8), t = 10,
// 128-bit identifier), with no parameter overridden.
//
// After reset the generator polynomial must equal the reference product of
// the distinct minimal polynomials m_1, m_3, ..., m_19 (degree 76). Random
// identifiers are enrolled (helper data checked against reference division),
// then re-presented with 0 to 10 bit errors spread over identifier and
// helper data: the syndromes S_1..S_20 (as powers of alpha) are checked
// against reference evaluation and the identifier must come back corrected
// with the right error count. Words with 14 errors must be flagged or at
// least not be returned as the original. Shared syndrome divisions,
// error-free words, corrected words, helper-only errors and flagged failures
// are counted and each must occur.
module tb_bch_top_full;
  import bch_ref_pkg::*;

  localparam int unsigned M = bch_pkg::GF_M, T = bch_pkg::BCH_T, K = bch_pkg::BCH_K;
  localparam int unsigned PRIM = bch_pkg::GF_PRIM, RW = T * M;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic          busy, init_done, enroll_start, enroll_done;
  logic          auth_start, auth_done, auth_fail, err_detected;
  logic [RW:0]   gen_poly;
  logic [6:0]    gen_deg;
  logic [K-1:0]  enroll_id, auth_id, auth_id_o;
  logic [RW-1:0] helper_o, auth_helper;
  logic [4:0]    auth_nerr;
  logic [M-1:0]  syn_pow_o  [1:2*T];
  logic          syn_zero_o [1:2*T];

  bch_top dut (.*);

  int cyc_now = 0;
  always @(posedge clk) cyc_now <= cyc_now + 1;

  // mechanism counters
  int n_gmul = 0, n_div = 0, n_auth = 0;
  int n_clean = 0, n_corrected = 0, n_helper_only = 0, n_flagged = 0;
  always @(posedge clk) begin
    if (dut.gm_start) n_gmul++;
    if (dut.dv_start) n_div++;
  end

  bigpoly_t g;
  int gd;

  task automatic run_auth(input logic [K-1:0] id, input logic [RW-1:0] hlp);
    auth_id = id; auth_helper = hlp;
    @(negedge clk) auth_start = 1;
    @(negedge clk) auth_start = 0;
    while (!auth_done) @(negedge clk);
    n_auth++;
  endtask

  initial begin
    bigpoly_t cw;
    int unsigned seen [$];
    logic [K-1:0] id, eid;
    logic [RW-1:0] hlp, ehl;
    int w, div_before, skipped, t0;
    enroll_start = 0; auth_start = 0; enroll_id = '0; auth_id = '0; auth_helper = '0;

    g = 1;
    skipped = 0;
    for (int j = 1; j <= 2 * T - 1; j += 2) begin
      int unsigned mp;
      bit dup;
      mp = minpoly(j, M, PRIM);
      dup = 0;
      foreach (seen[s]) if (seen[s] == mp) dup = 1;
      if (!dup) begin seen.push_back(mp); g = pmul(g, bigpoly_t'(mp)); end
      else skipped++;
    end
    gd = deg(g);

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (!init_done) @(negedge clk);
    $display("start-up took %0d cycles", cyc_now);
    check(gen_poly == g[RW:0], "generator polynomial");
    check(int'(gen_deg) == gd && gd == 76, $sformatf("generator degree %0d", gen_deg));
    check(n_gmul == T - skipped, $sformatf("%0d multiplications for g(x)", n_gmul));
    for (int j = 1; j <= 2 * T; j++)
      check(dut.mp_q[j] == 9'(minpoly(j, M, PRIM)), $sformatf("stored m_%0d", j));

    for (int n = 0; n < 26; n++) begin
      for (int q = 0; q < K / 32; q++) id[q*32 +: 32] = $urandom;
      enroll_id = id;
      @(negedge clk) enroll_start = 1;
      @(negedge clk) enroll_start = 0;
      while (!enroll_done) @(negedge clk);
      cw = pmod(bigpoly_t'(id) << gd, g);
      check(helper_o == cw[RW-1:0], $sformatf("helper data %0d", n));
      hlp = helper_o;

      // error pattern: n < 22 -> n % 11 errors; 22,23 -> helper only; 24,25 -> 14 errors
      w = (n < 22) ? n % 11 : (n < 24) ? 3 : 14;
      eid = '0; ehl = '0;
      for (int e = 0; e < w; e++) begin
        int p;
        if (n >= 22 && n < 24) begin
          do p = $urandom_range(gd - 1); while (ehl[p]);
          ehl[p] = 1'b1;
        end else begin
          do p = $urandom_range(K + gd - 1);
          while ((p >= gd) ? eid[p - gd] : ehl[p]);
          if (p >= gd) eid[p - gd] = 1'b1; else ehl[p] = 1'b1;
        end
      end
      div_before = n_div;
      t0 = cyc_now;
      run_auth(id ^ eid, hlp ^ ehl);
      $display("authentication %0d (%0d errors) took %0d cycles", n, w, cyc_now - t0);
      check(n_div - div_before < 2 * T, "syndrome divisions are shared");

      // syndromes against reference
      cw = (bigpoly_t'(id ^ eid) << gd) | bigpoly_t'(hlp ^ ehl);
      for (int j = 1; j <= 2 * T; j++) begin
        int unsigned v;
        v = peval(cw, j, M, PRIM);
        check(syn_zero_o[j] == (v == 0), $sformatf("word %0d: S_%0d zero flag", n, j));
        if (v != 0) check(syn_pow_o[j] == 8'(gf_log(v, M, PRIM)), $sformatf("word %0d: S_%0d power", n, j));
      end

      if (w <= T) begin
        check(auth_id_o == id, $sformatf("word %0d: identifier corrected (%0d errors)", n, w));
        check(int'(auth_nerr) == w, $sformatf("word %0d: error count %0d, expected %0d", n, auth_nerr, w));
        check(!auth_fail, $sformatf("word %0d: no failure flag", n));
        check(err_detected == (w != 0), $sformatf("word %0d: error detection", n));
        if (w == 0) n_clean++;
        else if (eid == '0) n_helper_only++;
        else n_corrected++;
      end else begin
        check(err_detected, $sformatf("word %0d: errors detected", n));
        if (auth_fail) n_flagged++;
        else check(auth_id_o != id, $sformatf("word %0d: miscorrection must not return the original", n));
      end
    end

    check(n_div < n_auth * 2 * T, "shared syndrome divisions");
    check(n_clean > 0, "error-free word seen");
    check(n_corrected > 0, "corrected word seen");
    check(n_helper_only > 0, "helper-only errors seen");
    check(n_flagged > 0, "uncorrectable word flagged");
    $display("mechanisms: g(x) multiplications=%0d divisions=%0d over %0d authentications, clean=%0d corrected=%0d helper_only=%0d flagged=%0d",
             n_gmul, n_div, n_auth, n_clean, n_corrected, n_helper_only, n_flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
