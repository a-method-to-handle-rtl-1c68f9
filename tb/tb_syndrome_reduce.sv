// tb_syndrome_reduce: checks the evaluation of syndrome polynomials.
//
// GF(2^4) with x^4+x+1: S_1(x) = x^3+1 at alpha gives alpha^14,
// S_2(x) = x^3+1 at alpha^2 gives alpha^13, S_3(x) = x^3+x at alpha^3 gives
// alpha^1, and S(x) = 0 gives the zero flag. GF(2^8) with 0x11D: random
// polynomials of degree below 8 at random alpha^j are compared with
// reference evaluation and a reference logarithm, and the time to `done`
// must be M+2 cycles plus syn_pow+2 cycles of search for a non-zero result.
module tb_syndrome_reduce;
  import bch_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       rdy4, st4, busy4, done4, ten4, z4;
  logic [3:0] sp4, j4, ta4, td4, sv4, spw4;
  gf_elem_gen #(.M(4), .PRIM('h13)) u_tab4 (.clk, .rst_n, .ready(rdy4),
    .rd_en(ten4), .rd_addr(ta4), .rd_data(td4));
  syndrome_reduce #(.M(4)) u4 (.clk, .rst_n, .start(st4), .spoly(sp4), .j(j4),
    .busy(busy4), .done(done4), .syn_vec(sv4), .syn_pow(spw4), .syn_zero(z4),
    .tab_en(ten4), .tab_addr(ta4), .tab_data(td4));

  logic       rdy8, st8, busy8, done8, ten8, z8;
  logic [7:0] sp8, j8, ta8, td8, sv8, spw8;
  gf_elem_gen u_tab8 (.clk, .rst_n, .ready(rdy8),
    .rd_en(ten8), .rd_addr(ta8), .rd_data(td8));
  syndrome_reduce u8 (.clk, .rst_n, .start(st8), .spoly(sp8), .j(j8),
    .busy(busy8), .done(done8), .syn_vec(sv8), .syn_pow(spw8), .syn_zero(z8),
    .tab_en(ten8), .tab_addr(ta8), .tab_data(td8));

  task automatic run4(input logic [3:0] sp, input logic [3:0] j,
                      input bit exp_zero, input logic [3:0] exp_pow);
    sp4 = sp; j4 = j;
    @(negedge clk) st4 = 1;
    @(negedge clk) st4 = 0;
    while (!done4) @(negedge clk);
    check(z4 == exp_zero, $sformatf("GF16 zero flag for S=%b j=%0d", sp, j));
    if (!exp_zero) check(spw4 == exp_pow, $sformatf("GF16 S=%b j=%0d -> alpha^%0d", sp, j, spw4));
  endtask

  initial begin
    int unsigned v;
    int cyc;
    st4 = 0; st8 = 0; sp4 = 0; j4 = 0; sp8 = 0; j8 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (!(rdy4 && rdy8)) @(negedge clk);

    run4(4'b1001, 4'd1, 0, 4'd14);
    run4(4'b1001, 4'd2, 0, 4'd13);
    run4(4'b1010, 4'd3, 0, 4'd1);
    run4(4'b0000, 4'd3, 1, 4'd0);

    for (int n = 0; n < 60; n++) begin
      sp8 = (n == 0) ? 8'h00 : (n == 1) ? 8'h01 : 8'($urandom);
      j8  = 8'($urandom_range(254, 1));
      @(negedge clk) st8 = 1;
      @(negedge clk) st8 = 0;
      cyc = 1;
      while (!done8) begin @(negedge clk); cyc++; end
      v = peval(bigpoly_t'(sp8), j8, 8, 'h11D);
      check(sv8 == 8'(v), $sformatf("GF256 value S=%h j=%0d", sp8, j8));
      check(z8 == (v == 0), "GF256 zero flag");
      if (v != 0) begin
        check(spw8 == 8'(gf_log(v, 8, 'h11D)), $sformatf("GF256 power S=%h j=%0d", sp8, j8));
        check(cyc == 8 + 2 + int'(spw8) + 2, $sformatf("GF256 took %0d cycles", cyc));
      end else begin
        check(cyc == 8 + 2, $sformatf("GF256 zero took %0d cycles", cyc));
      end
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
