// tb_sdp_ram: checks the block RAM model: one-cycle read latency, held read
// data while the read enable is low, old data on a same-address read and
// write, and random write/read-back against a shadow array.
module tb_sdp_ram;
  localparam int unsigned DEPTH = 16, WIDTH = 256;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic             we, re;
  logic [3:0]       wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] shadow [DEPTH];

  sdp_ram dut (.*);

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int w = 0; w < WIDTH / 32; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    we = 0; re = 0; wr_addr = 0; rd_addr = 0; wr_data = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; wr_addr = 4'(a); wr_data = rnd(); shadow[a] = wr_data;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = ($urandom_range(1) == 1); wr_addr = 4'($urandom); wr_data = rnd();
      re = 1; rd_addr = ($urandom_range(3) == 0) ? wr_addr : 4'($urandom);
      begin
        logic [WIDTH-1:0] expv;
        expv = shadow[rd_addr];
        if (we) shadow[wr_addr] = wr_data;
        @(negedge clk);
        we = 0; re = 0;
        check(rd_data == expv, $sformatf("read %0d", n));
        @(negedge clk);
        check(rd_data == expv, $sformatf("hold %0d", n));
      end
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
