// bch_syndrome_div: remainder of the received word divided by a minimal
// polynomial, the syndrome polynomial S_j(x) = r(x) mod m_j(x).
//
// The received word is r(x) = id(x) * x^hdeg + helper(x): the regenerated
// K-bit identifier followed by the hdeg-bit helper data, highest power first.
// Its bits enter a shift register one per cycle; whenever a one leaves
// position mdeg-1 the low part of m_j(x) is XORed in, so after K+hdeg cycles
// the register holds the remainder (degree below mdeg). The divisor comes
// from a register, so one instance serves every minimal polynomial.
//
// Interface: pulse `start` with all inputs stable until `done`; `busy` stays
// high for K+hdeg cycles, then `done` pulses and `rem` holds until the next
// start.
//
// Computing syndromes as remainders of the division by the minimal
// polynomials follows the source design; the serial divider is this design's
// own.
module bch_syndrome_div #(
  parameter int unsigned M  = bch_pkg::GF_M,
  parameter int unsigned T  = bch_pkg::BCH_T,
  parameter int unsigned K  = bch_pkg::BCH_K,
  localparam int unsigned RW = T * M,
  localparam int unsigned DW = $clog2(RW + 1),
  localparam int unsigned MW = $clog2(M + 1),
  localparam int unsigned L  = K + RW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [K-1:0]  id,
  input  logic [RW-1:0] helper,
  input  logic [DW-1:0] hdeg,
  input  logic [M:0]    mpoly,
  input  logic [MW-1:0] mdeg,
  output logic          busy,
  output logic          done,
  output logic [M-1:0]  rem
);

  logic [L-1:0]           word_q;   // received word, next bit at the top
  logic [$clog2(L+1)-1:0] cnt_q, len_q;
  logic                   run_q;
  logic [M:0]             mask_w;
  logic [M-1:0]           mask, taps, rem_next;
  logic                   out_bit;

  always_comb begin
    mask_w   = ((M+1)'(1) << mdeg) - 1'b1;
    mask     = mask_w[M-1:0];
    taps     = mpoly[M-1:0] & mask;
    out_bit  = rem[mdeg - 1'b1];
    rem_next = ({rem[M-2:0], word_q[L-1]} & mask) ^ (out_bit ? taps : '0);
  end

  assign busy = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      cnt_q  <= '0;
      len_q  <= '0;
      run_q  <= 1'b0;
      done   <= 1'b0;
      rem    <= '0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          // Align id*x^hdeg + helper to the top of the shift register.
          word_q <= (L'(id) << RW) | (L'(helper) << (DW'(RW) - hdeg));
          len_q  <= ($clog2(L+1))'(K) + ($clog2(L+1))'(hdeg);
          rem    <= '0;
          cnt_q  <= '0;
          run_q  <= 1'b1;
        end
      end else begin
        rem    <= rem_next;
        word_q <= {word_q[L-2:0], 1'b0};
        cnt_q  <= cnt_q + 1'b1;
        if (cnt_q + 1'b1 == len_q) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

  a_mdeg_range: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (mdeg != '0 && mdeg <= MW'(M) && mpoly[mdeg]));

endmodule
