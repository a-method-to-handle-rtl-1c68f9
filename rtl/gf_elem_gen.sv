// gf_elem_gen: generates the elements of GF(2^M) and keeps them in a table.
//
// After reset the block walks the powers of the primitive root alpha: each
// new element is the previous one shifted left by one bit, and when the bit
// shifted out reaches position M the primitive polynomial is subtracted
// (XORed). Element alpha^i is written at address i of a 2^M x M block RAM, so
// the table maps a power of alpha to its binary-vector form. Address 2^M-1
// holds alpha^(2^M-1) = 1, which lets callers index the table with an
// unreduced exponent of 2^M-1. Filling takes 2^M cycles; `ready` rises after
// the last write and stays high until the next reset.
//
// Read port: present rd_addr with rd_en high, rd_data is valid one cycle
// later (synchronous block RAM). Reads before `ready` return stale data.
//
// The shift-and-subtract generation and the table addressed by the power of
// alpha follow the source design; the reset behaviour and the port timing are
// this design's own.
module gf_elem_gen #(
  parameter int unsigned M    = bch_pkg::GF_M,
  parameter int unsigned PRIM = bch_pkg::GF_PRIM
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         ready,
  input  logic         rd_en,
  input  logic [M-1:0] rd_addr,
  output logic [M-1:0] rd_data
);

  localparam int unsigned SIZE = 1 << M;

  logic [M-1:0] elem_q;     // current element alpha^idx_q
  logic [M-1:0] idx_q;      // its power
  logic         gen_q;      // generation in progress
  logic [M-1:0] elem_next;

  // alpha * elem: shift, subtract the primitive polynomial on overflow.
  always_comb begin
    elem_next = {elem_q[M-2:0], 1'b0};
    if (elem_q[M-1]) elem_next = elem_next ^ PRIM[M-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elem_q <= M'(1);
      idx_q  <= '0;
      gen_q  <= 1'b1;
      ready  <= 1'b0;
    end else if (gen_q) begin
      elem_q <= elem_next;
      idx_q  <= idx_q + 1'b1;
      if (idx_q == M'(SIZE - 1)) begin
        gen_q <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  // Entry 2^M-1 is written with alpha^(2^M-1), which the recurrence yields as 1.
  sdp_ram #(.DEPTH(SIZE), .WIDTH(M)) u_table (
    .clk     (clk),
    .we      (gen_q),
    .wr_addr (idx_q),
    .wr_data (elem_q),
    .re      (rd_en),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

endmodule
