// gf2_poly_mul: the single polynomial multiplier that builds the generator
// polynomial g(x) = m_1(x) * m_3(x) * ... * m_(2t-1)(x).
//
// The block keeps the running product in an accumulator and multiplies it by
// one binary operand polynomial per request. The multiplication is sequential
// (Horner's rule, most significant operand bit first): each cycle the partial
// result is shifted up by one degree and the accumulator is XORed in when the
// operand bit is 1, so a product takes M+1 cycles. Because the distinct
// minimal polynomials are co-prime, their product is their least common
// multiple; skipping repeated minimal polynomials is the caller's job.
//
// Interface: `clear` (one cycle, while idle) sets the accumulator to 1.
// `start` with `operand` (bit a = coefficient of x^a, degree <= M) multiplies
// it in; `busy` is high for M+1 cycles and `done` pulses when `prod` and
// `deg` are updated. A product whose degree would exceed RW is truncated and
// caught by an assertion.
//
// Using one multiplier instance, fed with the previous result and one minimal
// polynomial per step, follows the source design; the bit-serial Horner
// structure and the handshake are this design's own.
module gf2_poly_mul #(
  parameter int unsigned M  = bch_pkg::GF_M,
  parameter int unsigned RW = bch_pkg::BCH_T * bch_pkg::GF_M,
  localparam int unsigned DW = $clog2(RW + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          start,
  input  logic [M:0]    operand,
  output logic          busy,
  output logic          done,
  output logic [RW:0]   prod,
  output logic [DW-1:0] deg
);

  logic [RW:0]          acc_q;   // multiplicand (previous product)
  logic [RW:0]          part_q;  // partial product
  logic [M:0]           op_q;
  logic [$clog2(M+1):0] bit_q;
  logic                 run_q;
  logic [RW:0]          part_next;

  assign part_next = {part_q[RW-1:0], 1'b0} ^ (op_q[M] ? acc_q : '0);
  assign busy      = run_q;

  // Degree of the product: position of the leading one.
  function automatic logic [DW-1:0] lead(input logic [RW:0] v);
    lead = '0;
    for (int i = 0; i <= RW; i++) if (v[i]) lead = DW'(i);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q  <= (RW+1)'(1);
      part_q <= '0;
      op_q   <= '0;
      bit_q  <= '0;
      run_q  <= 1'b0;
      done   <= 1'b0;
      prod   <= (RW+1)'(1);
      deg    <= '0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (clear) begin
          acc_q <= (RW+1)'(1);
          prod  <= (RW+1)'(1);
          deg   <= '0;
        end else if (start) begin
          op_q   <= operand;
          part_q <= '0;
          bit_q  <= '0;
          run_q  <= 1'b1;
        end
      end else begin
        part_q <= part_next;
        op_q   <= {op_q[M-1:0], 1'b0};
        bit_q  <= bit_q + 1'b1;
        if (bit_q == ($clog2(M+1)+1)'(M)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
          acc_q <= part_next;
          prod  <= part_next;
          deg   <= lead(part_next);
        end
      end
    end
  end

  // The product must fit in RW+1 bits: no shift may push a one out.
  a_no_ovf: assert property (@(posedge clk) disable iff (!rst_n)
    run_q |-> (part_q[RW] == 1'b0));

endmodule
