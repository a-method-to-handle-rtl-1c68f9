// tb_gf_minpoly: checks the minimal-polynomial unit in GF(2^4) and GF(2^8).
//
// Each instance reads its own element table (gf_elem_gen). In GF(2^4) with
// x^4+x+1 every i = 0..14 is checked, including m_1 = x^4+x+1 and
// m_3 = x^4+x^3+x^2+x+1; in GF(2^8) with 0x11D the indices 1..21 (all a
// t = 10 code needs) and a few others are checked, including the degree-4
// m_17 and the degree-2 m_85. Expected polynomials come from the reference
// package, which multiplies out (x + beta) with binary-vector arithmetic.
module tb_gf_minpoly;
  import bch_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // GF(2^4)
  logic        rdy4, st4, busy4, done4, ten4;
  logic [3:0]  idx4, taddr4, tdata4;
  logic [4:0]  poly4;
  logic [2:0]  deg4;
  gf_elem_gen #(.M(4), .PRIM('h13)) u_tab4 (.clk, .rst_n, .ready(rdy4),
    .rd_en(ten4), .rd_addr(taddr4), .rd_data(tdata4));
  gf_minpoly #(.M(4)) u_mp4 (.clk, .rst_n, .start(st4), .idx(idx4), .busy(busy4),
    .done(done4), .poly(poly4), .deg(deg4), .tab_en(ten4), .tab_addr(taddr4),
    .tab_data(tdata4));

  // GF(2^8)
  logic        rdy8, st8, busy8, done8, ten8;
  logic [7:0]  idx8, taddr8, tdata8;
  logic [8:0]  poly8;
  logic [3:0]  deg8;
  gf_elem_gen #(.M(8), .PRIM('h11D)) u_tab8 (.clk, .rst_n, .ready(rdy8),
    .rd_en(ten8), .rd_addr(taddr8), .rd_data(tdata8));
  gf_minpoly u_mp8 (.clk, .rst_n, .start(st8), .idx(idx8), .busy(busy8),
    .done(done8), .poly(poly8), .deg(deg8), .tab_en(ten8), .tab_addr(taddr8),
    .tab_data(tdata8));

  function automatic int pdeg(input int unsigned p);
    for (int i = 31; i >= 0; i--) if (((p >> i) & 1) != 0) return i;
    return -1;
  endfunction

  initial begin
    int unsigned exp4, exp8;
    int list8 [$] = '{1,2,3,4,5,6,7,8,9,10,11,12,13,14,15,16,17,18,19,20,21,85,127,254};
    st4 = 0; idx4 = 0; st8 = 0; idx8 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (!(rdy4 && rdy8)) @(posedge clk);

    // fixed GF(2^4) examples
    check(minpoly(1, 4, 'h13) == 'h13, "reference m_1 in GF(16)");
    check(minpoly(3, 4, 'h13) == 'h1F, "reference m_3 in GF(16)");

    for (int i = 0; i < 15; i++) begin
      @(negedge clk); idx4 = 4'(i); st4 = 1'b1;
      @(negedge clk); st4 = 1'b0;
      while (!done4) @(posedge clk);
      @(negedge clk);
      exp4 = minpoly(i, 4, 'h13);
      check(poly4 == 5'(exp4), $sformatf("GF16 m_%0d = %b, expected %b", i, poly4, exp4));
      check(int'(deg4) == pdeg(exp4), $sformatf("GF16 deg m_%0d = %0d", i, deg4));
    end

    foreach (list8[n]) begin
      @(negedge clk); idx8 = 8'(list8[n]); st8 = 1'b1;
      @(negedge clk); st8 = 1'b0;
      while (!done8) @(posedge clk);
      @(negedge clk);
      exp8 = minpoly(list8[n], 8, 'h11D);
      check(poly8 == 9'(exp8), $sformatf("GF256 m_%0d = %b, expected %b", list8[n], poly8, exp8));
      check(int'(deg8) == pdeg(exp8), $sformatf("GF256 deg m_%0d = %0d", list8[n], deg8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
