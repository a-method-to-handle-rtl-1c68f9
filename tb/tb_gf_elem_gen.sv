// tb_gf_elem_gen: checks the GF(2^8) element table.
//
// After reset the table must be ready after exactly 2^M cycles and every
// entry alpha^i must equal the reference shift-and-add power. Four entries
// are also compared with fixed values of GF(2^8) under x^8+x^4+x^3+x^2+1
// (alpha^126 = 01100110, alpha^127 = 11001100, alpha^129 = 00010111,
// alpha^130 = 00101110).
module tb_gf_elem_gen;
  import bch_ref_pkg::*;

  localparam int unsigned M = 8;
  localparam int unsigned PRIM = 'h11D;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ready, rd_en;
  logic [M-1:0] rd_addr, rd_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  gf_elem_gen #(.M(M), .PRIM(PRIM)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned fixed_value(input int unsigned i);
    case (i)
      126: return 'h66;
      127: return 'hCC;
      129: return 'h17;
      130: return 'h2E;
      default: return 'hFFFF;
    endcase
  endfunction

  initial begin
    int start_cyc;
    rd_en = 1'b0; rd_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    start_cyc = cyc;
    while (!ready) @(posedge clk);
    check(cyc - start_cyc == (1 << M), $sformatf("fill took %0d cycles", cyc - start_cyc));
    for (int i = 0; i < (1 << M); i++) begin
      @(negedge clk); rd_en = 1'b1; rd_addr = M'(i);
      @(negedge clk); rd_en = 1'b0;
      check(rd_data == M'(gf_exp(i, M, PRIM)),
            $sformatf("alpha^%0d = %h, expected %h", i, rd_data, gf_exp(i, M, PRIM)));
      if (fixed_value(i) != 'hFFFF)
        check(rd_data == M'(fixed_value(i)), $sformatf("fixed alpha^%0d = %h", i, rd_data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
