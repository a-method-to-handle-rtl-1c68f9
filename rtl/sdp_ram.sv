// sdp_ram: simple dual-port block RAM, one write port and one read port.
//
// Models the FPGA block memories the design keeps its tables and intermediate
// polynomial coefficients in. A write takes effect at the clock edge; a read
// is synchronous with one cycle of latency (rd_data shows mem[rd_addr] of the
// previous cycle). Reading and writing the same address in one cycle returns
// the old contents. The RAM has no reset: its users initialise every word
// they later read, which is how the source design uses its memories (an
// explicit initialisation phase). Depth and width are generic.
module sdp_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 256,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             re,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (re) rd_data <= mem[rd_addr];
  end

endmodule
