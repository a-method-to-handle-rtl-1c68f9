// tb_gf_mul_vec: checks binary-vector multiplication in GF(2^4) and GF(2^8).
//
// GF(2^4) with x^4+x+1: 0111 * 1110 = 1100 (alpha^10 * alpha^11 = alpha^6),
// then all pairs compared with the sum of exponents. GF(2^8) with 0x11D: all
// pairs compared with the reference multiplication.
module tb_gf_mul_vec;
  import bch_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] a4, b4, y4;
  logic [7:0] a8, b8, y8;
  gf_mul_vec #(.M(4), .PRIM('h13)) u4 (.a(a4), .b(b4), .y(y4));
  gf_mul_vec u8 (.a(a8), .b(b8), .y(y8));

  initial begin
    a4 = 4'b0111; b4 = 4'b1110; #1;
    check(y4 == 4'b1100, "0111 * 1110");
    for (int ea = 0; ea < 15; ea++)
      for (int eb = 0; eb < 15; eb++) begin
        a4 = 4'(gf_exp(ea, 4, 'h13)); b4 = 4'(gf_exp(eb, 4, 'h13)); #1;
        check(y4 == 4'(gf_exp((ea + eb) % 15, 4, 'h13)), $sformatf("alpha^%0d * alpha^%0d", ea, eb));
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b += 3) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        check(y8 == 8'(gf_mul(a, b, 8, 'h11D)), $sformatf("%h * %h", a, b));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
