// tb_gf_pow_mul: checks multiplication and division in power-of-alpha form.
//
// GF(2^4): alpha^10 * alpha^11 = alpha^6 and alpha^11 / alpha^10 = alpha, then
// every pair of exponents, the products compared through binary-vector
// multiplication. GF(2^8): random pairs, and the zero and division-by-zero
// flags.
module tb_gf_pow_mul;
  import bch_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] a4, b4, y4;
  logic       az4, bz4, d4, yz4, dz4;
  gf_pow_mul #(.M(4)) u4 (.a_pow(a4), .a_zero(az4), .b_pow(b4), .b_zero(bz4),
    .div(d4), .y_pow(y4), .y_zero(yz4), .div_by_zero(dz4));

  logic [7:0] a8, b8, y8;
  logic       az8, bz8, d8, yz8, dz8;
  gf_pow_mul u8 (.a_pow(a8), .a_zero(az8), .b_pow(b8), .b_zero(bz8),
    .div(d8), .y_pow(y8), .y_zero(yz8), .div_by_zero(dz8));

  initial begin
    az4 = 0; bz4 = 0; az8 = 0; bz8 = 0;
    a4 = 10; b4 = 11; d4 = 0; #1;
    check(y4 == 6, "alpha^10 * alpha^11");
    a4 = 11; b4 = 10; d4 = 1; #1;
    check(y4 == 1, "alpha^11 / alpha^10");
    for (int a = 0; a < 15; a++)
      for (int b = 0; b < 15; b++) begin
        a4 = 4'(a); b4 = 4'(b); d4 = 0; #1;
        check(gf_exp(y4, 4, 'h13) == gf_mul(gf_exp(a, 4, 'h13), gf_exp(b, 4, 'h13), 4, 'h13),
              $sformatf("GF16 %0d*%0d", a, b));
        d4 = 1; #1;
        check(gf_mul(gf_exp(y4, 4, 'h13), gf_exp(b, 4, 'h13), 4, 'h13) == gf_exp(a, 4, 'h13),
              $sformatf("GF16 %0d/%0d", a, b));
      end
    for (int n = 0; n < 200; n++) begin
      a8 = 8'($urandom_range(254)); b8 = 8'($urandom_range(254)); d8 = 0; #1;
      check(gf_exp(y8, 8, 'h11D) == gf_mul(gf_exp(a8, 8, 'h11D), gf_exp(b8, 8, 'h11D), 8, 'h11D),
            "GF256 product");
      d8 = 1; #1;
      check(gf_mul(gf_exp(y8, 8, 'h11D), gf_exp(b8, 8, 'h11D), 8, 'h11D) == gf_exp(a8, 8, 'h11D),
            "GF256 quotient");
    end
    az8 = 1; d8 = 0; #1;
    check(yz8 && !dz8, "zero factor");
    az8 = 0; bz8 = 1; d8 = 1; #1;
    check(yz8 && dz8, "division by zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
