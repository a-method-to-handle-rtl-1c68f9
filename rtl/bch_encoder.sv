// bch_encoder: computes the BCH helper data (parity) of a K-bit message.
//
// The message is read as a polynomial, bit K-1 being the coefficient of the
// highest power. It is extended by deg g(x) zeros (multiplied by x^deg g) and
// divided by the generator polynomial g(x); the remainder is the helper data,
// and msg*x^deg + remainder is a codeword of the shortened BCH code. The
// division is a linear-feedback shift register whose taps come from a g(x)
// register, so the same hardware serves any generator up to degree RW; it
// consumes one message bit per cycle.
//
// Interface: pulse `start` with `msg`, `gpoly` and `gdeg` stable; `busy`
// stays high for K cycles, then `done` pulses and `rem` (bits gdeg-1..0, the
// rest zero) holds until the next start.
//
// Division by g(x) and taking the remainder as helper data follow the source
// design; the serial LFSR form is this design's own.
module bch_encoder #(
  parameter int unsigned M  = bch_pkg::GF_M,
  parameter int unsigned T  = bch_pkg::BCH_T,
  parameter int unsigned K  = bch_pkg::BCH_K,
  localparam int unsigned RW = T * M,
  localparam int unsigned DW = $clog2(RW + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [K-1:0]  msg,
  input  logic [RW:0]   gpoly,
  input  logic [DW-1:0] gdeg,
  output logic          busy,
  output logic          done,
  output logic [RW-1:0] rem
);

  logic [K-1:0]         msg_q;
  logic [$clog2(K+1)-1:0] cnt_q;
  logic                 run_q;
  logic [RW:0]          mask_w;
  logic [RW-1:0]        mask, taps, rem_next;
  logic                 fb;

  always_comb begin
    mask_w   = ((RW+1)'(1) << gdeg) - 1'b1;
    mask     = mask_w[RW-1:0];
    taps     = gpoly[RW-1:0] & mask;
    fb       = msg_q[K-1] ^ rem[gdeg - 1'b1];
    rem_next = ({rem[RW-2:0], 1'b0} & mask) ^ (fb ? taps : '0);
  end

  assign busy = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg_q <= '0;
      cnt_q <= '0;
      run_q <= 1'b0;
      done  <= 1'b0;
      rem   <= '0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          msg_q <= msg;
          rem   <= '0;
          cnt_q <= '0;
          run_q <= 1'b1;
        end
      end else begin
        rem   <= rem_next;
        msg_q <= {msg_q[K-2:0], 1'b0};
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == ($clog2(K+1))'(K - 1)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

  a_gdeg_range: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (gdeg != '0 && gdeg <= DW'(RW) && gpoly[gdeg]));

endmodule
