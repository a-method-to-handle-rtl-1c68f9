// bch_err_locator: finds the error-locator polynomial Lambda(x) from the
// syndromes S_1..S_2T (Berlekamp-Massey, inversion-free form).
//
// Lambda(x) is the polynomial whose roots are the inverses of the error
// positions alpha^p; its degree is the number of errors. The block runs 2T
// iterations r = 0..2T-1. Each computes the discrepancy
// Delta = sum_i Lambda_i * S_(r+1-i) with one multiplier, one term per cycle,
// then updates Lambda <- gamma*Lambda + Delta*x*B with two multipliers, one
// coefficient per cycle (highest first, so the old lower coefficients are
// still there when needed). When Delta is non-zero and 2L <= r, B takes the
// old Lambda, L becomes r+1-L and gamma becomes Delta; otherwise B is shifted
// up by one degree. Working without inverses scales Lambda by a non-zero
// constant, which leaves its roots unchanged. Syndromes and coefficients are
// binary vectors (gf_mul_vec).
//
// Interface: pulse `start` with `syn` stable until `done`; after
// 2T*(2T+2)+1 cycles `done` pulses and `lambda` (index i = coefficient of x^i)
// and `nerr` = L hold until the next start. `nerr` above T means the word
// cannot be corrected.
//
// The source design names this step (determine the number of errors and the
// error-locator polynomial from the syndromes) without giving its insides;
// the Berlekamp-Massey algorithm and the serial structure are this design's
// own choice.
module bch_err_locator #(
  parameter int unsigned M    = bch_pkg::GF_M,
  parameter int unsigned PRIM = bch_pkg::GF_PRIM,
  parameter int unsigned T    = bch_pkg::BCH_T,
  localparam int unsigned IW  = $clog2(2 * T + 2),
  localparam int unsigned LW  = $clog2(2 * T + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [M-1:0]  syn [1:2*T],
  output logic          busy,
  output logic          done,
  output logic [M-1:0]  lambda [0:T],
  output logic [LW-1:0] nerr
);

  typedef enum logic [1:0] {S_IDLE, S_DISC, S_UPD} state_t;

  state_t        st_q;
  logic [M-1:0]  bb_q [0:T];
  logic [M-1:0]  gamma_q, delta_q;
  logic [IW-1:0] r_q;        // iteration
  logic [IW-1:0] i_q;        // coefficient index
  logic          cond_q;

  logic [M-1:0]  d_a, d_b, d_y;       // discrepancy term
  logic [M-1:0]  u_y1, u_y2;          // gamma*Lambda_i, Delta*B_(i-1)
  logic [M-1:0]  b_prev;

  // Discrepancy term Lambda_i * S_(r+1-i); zero when r+1-i < 1.
  always_comb begin
    d_a = lambda[i_q[$clog2(T+1)-1:0]];
    d_b = '0;
    if (i_q <= r_q) d_b = syn[r_q - i_q + 1'b1];
    b_prev = (i_q == '0) ? '0 : bb_q[($clog2(T+1))'(i_q - 1'b1)];
  end

  gf_mul_vec #(.M(M), .PRIM(PRIM)) u_disc (.a(d_a), .b(d_b), .y(d_y));
  gf_mul_vec #(.M(M), .PRIM(PRIM)) u_upd1 (.a(gamma_q), .b(lambda[i_q[$clog2(T+1)-1:0]]), .y(u_y1));
  gf_mul_vec #(.M(M), .PRIM(PRIM)) u_upd2 (.a(delta_q), .b(b_prev), .y(u_y2));

  assign busy = (st_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      gamma_q <= '0;
      delta_q <= '0;
      r_q     <= '0;
      i_q     <= '0;
      cond_q  <= 1'b0;
      nerr    <= '0;
      done    <= 1'b0;
      for (int k = 0; k <= T; k++) begin
        lambda[k] <= '0;
        bb_q[k]   <= '0;
      end
    end else begin
      done <= 1'b0;
      case (st_q)
        S_IDLE: begin
          if (start) begin
            for (int k = 0; k <= T; k++) begin
              lambda[k] <= (k == 0) ? M'(1) : '0;
              bb_q[k]   <= (k == 0) ? M'(1) : '0;
            end
            gamma_q <= M'(1);
            delta_q <= '0;
            nerr    <= '0;
            r_q     <= '0;
            i_q     <= '0;
            st_q    <= S_DISC;
          end
        end
        S_DISC: begin
          delta_q <= delta_q ^ d_y;
          i_q     <= i_q + 1'b1;
          if (i_q == IW'(T)) begin
            // decide the B update with the complete discrepancy
            cond_q <= ((delta_q ^ d_y) != '0) && ({nerr, 1'b0} <= (LW+1)'(r_q));
            i_q    <= IW'(T);
            st_q   <= S_UPD;
          end
        end
        S_UPD: begin
          lambda[i_q[$clog2(T+1)-1:0]] <= u_y1 ^ u_y2;
          bb_q[i_q[$clog2(T+1)-1:0]]   <= cond_q ? lambda[i_q[$clog2(T+1)-1:0]] : b_prev;
          i_q <= i_q - 1'b1;
          if (i_q == '0) begin
            if (cond_q) begin
              nerr    <= LW'(r_q + 1'b1 - IW'(nerr));
              gamma_q <= delta_q;
            end
            delta_q <= '0;
            i_q     <= '0;
            r_q     <= r_q + 1'b1;
            if (r_q == IW'(2 * T - 1)) begin
              done <= 1'b1;
              st_q <= S_IDLE;
            end else begin
              st_q <= S_DISC;
            end
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
