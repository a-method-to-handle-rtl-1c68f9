// bch_top: BCH(n,k,t) engine for a key-recovery (helper-data) scheme.
//
// A device identifier of K bits (for example a PUF response) is protected by
// a shortened binary BCH code over GF(2^M) that corrects up to T bit errors.
// Enrollment computes helper data (the BCH parity of the identifier);
// authentication takes a re-measured identifier with the stored helper data
// and returns the corrected identifier.
//
// Everything the code needs is derived on chip after reset, with few
// resources and mostly sequential work:
//   1. gf_elem_gen fills the table power-of-alpha -> binary vector.
//   2. gf_minpoly computes m_j(x) for j = 1..2T; each is compared with the
//      earlier ones, and j is marked as sharing the first equal one.
//   3. gf2_poly_mul multiplies the distinct m_j of odd j into g(x).
//   `init_done` then rises and g(x) is shown on gen_poly/gen_deg.
// Enrollment (enroll_start): bch_encoder divides id*x^deg g by g(x); the
// remainder is helper_o (K cycles).
// Authentication (auth_start): for every j, bch_syndrome_div gives
// S_j(x) = r(x) mod m_j(x) with r = id*x^deg g + helper, one division per
// distinct minimal polynomial (a j that shares m_j reuses the earlier
// remainder); syndrome_reduce evaluates S_j(alpha^j) and finds its power of
// alpha (syn_pow_o / syn_zero_o). If any syndrome is non-zero,
// bch_err_locator finds Lambda(x) and bch_chien its roots; the bits found in
// the identifier part are flipped. auth_fail is set when more than T errors
// are found or Lambda does not have as many roots in the word as its degree.
//
// Interface: start pulses are accepted while `busy` is low and `init_done`
// is high; enroll_done / auth_done pulse when the results are valid; results
// hold until the next operation of the same kind. Inputs must stay stable
// until the done pulse. Positions: bit i of an identifier or helper vector
// is the coefficient of x^i; the received word is id in the high part and
// helper in the low deg g bits.
//
// The table, the minimal-polynomial method, the single multiplier for g(x),
// the division-based encoder and syndromes, the sharing of equal minimal
// polynomials and the syndrome evaluation follow the source design. The
// control sequence, the handshakes, and the error-locator and Chien-search
// back end (which the source design only names) are this design's own.
module bch_top #(
  parameter int unsigned M    = bch_pkg::GF_M,
  parameter int unsigned PRIM = bch_pkg::GF_PRIM,
  parameter int unsigned T    = bch_pkg::BCH_T,
  parameter int unsigned K    = bch_pkg::BCH_K,
  localparam int unsigned RW  = T * M,
  localparam int unsigned DW  = $clog2(RW + 1),
  localparam int unsigned MW  = $clog2(M + 1),
  localparam int unsigned L   = K + RW,
  localparam int unsigned PW  = $clog2(L + 1),
  localparam int unsigned JW  = $clog2(2 * T + 1),
  localparam int unsigned LW  = $clog2(2 * T + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          busy,
  output logic          init_done,
  output logic [RW:0]   gen_poly,
  output logic [DW-1:0] gen_deg,
  // enrollment
  input  logic          enroll_start,
  input  logic [K-1:0]  enroll_id,
  output logic          enroll_done,
  output logic [RW-1:0] helper_o,
  // authentication
  input  logic          auth_start,
  input  logic [K-1:0]  auth_id,
  input  logic [RW-1:0] auth_helper,
  output logic          auth_done,
  output logic [K-1:0]  auth_id_o,
  output logic [LW-1:0] auth_nerr,
  output logic          auth_fail,
  output logic          err_detected,
  output logic [M-1:0]  syn_pow_o  [1:2*T],
  output logic          syn_zero_o [1:2*T]
);

  typedef enum logic [4:0] {
    C_TAB, C_MP_GO, C_MP_WAIT, C_G_CLR, C_G_GO, C_G_WAIT, C_IDLE,
    C_ENC_WAIT, C_DIV_GO, C_DIV_WAIT, C_RED_GO, C_RED_WAIT,
    C_BM_GO, C_BM_WAIT, C_CH_GO, C_CH_WAIT
  } state_t;

  state_t         st_q;
  logic [JW-1:0]  j_q;
  logic [M:0]     mp_q    [1:2*T];   // minimal polynomials
  logic [MW-1:0]  md_q    [1:2*T];   // their degrees
  logic [JW-1:0]  first_q [1:2*T];   // first j with the same minimal polynomial
  logic [M-1:0]   srem_q  [1:2*T];   // syndrome polynomials
  logic [M-1:0]   svec_q  [1:2*T];   // syndromes, binary vectors

  // ---------------- element table, shared read port ----------------
  logic          tab_ready, tab_en;
  logic [M-1:0]  tab_addr, tab_data;
  logic          mp_ten, sr_ten;
  logic [M-1:0]  mp_taddr, sr_taddr;

  assign tab_en   = mp_ten | sr_ten;
  assign tab_addr = mp_ten ? mp_taddr : sr_taddr;

  gf_elem_gen #(.M(M), .PRIM(PRIM)) u_tab (
    .clk, .rst_n, .ready(tab_ready),
    .rd_en(tab_en), .rd_addr(tab_addr), .rd_data(tab_data));

  // ---------------- minimal polynomials ----------------
  logic          mp_start, mp_busy, mp_done;
  logic [M:0]    mp_poly;
  logic [MW-1:0] mp_deg;

  gf_minpoly #(.M(M)) u_minpoly (
    .clk, .rst_n, .start(mp_start), .idx(M'(j_q)), .busy(mp_busy),
    .done(mp_done), .poly(mp_poly), .deg(mp_deg),
    .tab_en(mp_ten), .tab_addr(mp_taddr), .tab_data(tab_data));

  // Smallest earlier j with the same minimal polynomial (or j itself).
  logic [JW-1:0] first_new;
  always_comb begin
    first_new = j_q;
    for (int k = 2 * T; k >= 1; k--)
      if (JW'(k) < j_q && mp_q[k] == mp_poly) first_new = JW'(k);
  end

  // ---------------- generator polynomial ----------------
  logic gm_clear, gm_start, gm_busy, gm_done;

  gf2_poly_mul #(.M(M), .RW(RW)) u_gmul (
    .clk, .rst_n, .clear(gm_clear), .start(gm_start), .operand(mp_q[j_q]),
    .busy(gm_busy), .done(gm_done), .prod(gen_poly), .deg(gen_deg));

  // ---------------- encoder ----------------
  logic enc_start, enc_busy, enc_done;

  bch_encoder #(.M(M), .T(T), .K(K)) u_enc (
    .clk, .rst_n, .start(enc_start), .msg(enroll_id), .gpoly(gen_poly),
    .gdeg(gen_deg), .busy(enc_busy), .done(enc_done), .rem(helper_o));

  // ---------------- syndromes ----------------
  logic         dv_start, dv_busy, dv_done;
  logic [M-1:0] dv_rem;

  bch_syndrome_div #(.M(M), .T(T), .K(K)) u_div (
    .clk, .rst_n, .start(dv_start), .id(auth_id), .helper(auth_helper),
    .hdeg(gen_deg), .mpoly(mp_q[j_q]), .mdeg(md_q[j_q]),
    .busy(dv_busy), .done(dv_done), .rem(dv_rem));

  logic         sr_start, sr_busy, sr_done, sr_zero;
  logic [M-1:0] sr_vec, sr_pow;

  syndrome_reduce #(.M(M)) u_red (
    .clk, .rst_n, .start(sr_start), .spoly(srem_q[j_q]), .j(M'(j_q)),
    .busy(sr_busy), .done(sr_done), .syn_vec(sr_vec), .syn_pow(sr_pow),
    .syn_zero(sr_zero), .tab_en(sr_ten), .tab_addr(sr_taddr), .tab_data(tab_data));

  // ---------------- error locator and Chien search ----------------
  logic          bm_start, bm_busy, bm_done;
  logic [M-1:0]  lambda [0:T];
  logic [LW-1:0] bm_nerr;

  bch_err_locator #(.M(M), .PRIM(PRIM), .T(T)) u_bm (
    .clk, .rst_n, .start(bm_start), .syn(svec_q), .busy(bm_busy),
    .done(bm_done), .lambda(lambda), .nerr(bm_nerr));

  logic          ch_start, ch_busy, ch_done;
  logic [L-1:0]  ch_mask;
  logic [PW-1:0] ch_nroots;
  logic [L-1:0]  id_mask;

  bch_chien #(.M(M), .PRIM(PRIM), .T(T), .K(K)) u_chien (
    .clk, .rst_n, .start(ch_start), .lambda(lambda),
    .len(PW'(K) + PW'(gen_deg)), .busy(ch_busy), .done(ch_done),
    .err_mask(ch_mask), .nroots(ch_nroots));

  assign id_mask = ch_mask >> gen_deg;

  // ---------------- control ----------------
  logic any_nonzero;
  always_comb begin
    any_nonzero = 1'b0;
    for (int k = 1; k <= 2 * T; k++) any_nonzero = any_nonzero | (svec_q[k] != '0);
  end

  assign mp_start  = (st_q == C_MP_GO);
  assign gm_clear  = (st_q == C_G_CLR);
  assign gm_start  = (st_q == C_G_GO) && (first_q[j_q] == j_q);
  assign enc_start = (st_q == C_IDLE) && enroll_start;
  assign dv_start  = (st_q == C_DIV_GO) && (first_q[j_q] == j_q);
  assign sr_start  = (st_q == C_RED_GO);
  assign bm_start  = (st_q == C_BM_GO);
  assign ch_start  = (st_q == C_CH_GO);
  assign busy      = (st_q != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q         <= C_TAB;
      j_q          <= JW'(1);
      init_done    <= 1'b0;
      enroll_done  <= 1'b0;
      auth_done    <= 1'b0;
      auth_id_o    <= '0;
      auth_nerr    <= '0;
      auth_fail    <= 1'b0;
      err_detected <= 1'b0;
      for (int k = 1; k <= 2 * T; k++) begin
        mp_q[k]       <= '0;
        md_q[k]       <= '0;
        first_q[k]    <= JW'(k);
        srem_q[k]     <= '0;
        svec_q[k]     <= '0;
        syn_pow_o[k]  <= '0;
        syn_zero_o[k] <= 1'b1;
      end
    end else begin
      enroll_done <= 1'b0;
      auth_done   <= 1'b0;
      case (st_q)
        // ---- start-up ----
        C_TAB: if (tab_ready) begin j_q <= JW'(1); st_q <= C_MP_GO; end
        C_MP_GO: st_q <= C_MP_WAIT;
        C_MP_WAIT: if (mp_done) begin
          mp_q[j_q]    <= mp_poly;
          md_q[j_q]    <= mp_deg;
          first_q[j_q] <= first_new;
          if (j_q == JW'(2 * T)) st_q <= C_G_CLR;
          else begin j_q <= j_q + 1'b1; st_q <= C_MP_GO; end
        end
        C_G_CLR: begin j_q <= JW'(1); st_q <= C_G_GO; end
        C_G_GO: begin
          if (first_q[j_q] == j_q) st_q <= C_G_WAIT;
          else if (j_q >= JW'(2 * T - 1)) begin init_done <= 1'b1; st_q <= C_IDLE; end
          else j_q <= j_q + JW'(2);
        end
        C_G_WAIT: if (gm_done) begin
          if (j_q >= JW'(2 * T - 1)) begin init_done <= 1'b1; st_q <= C_IDLE; end
          else begin j_q <= j_q + JW'(2); st_q <= C_G_GO; end
        end
        // ---- operations ----
        C_IDLE: begin
          if (enroll_start) st_q <= C_ENC_WAIT;
          else if (auth_start) begin j_q <= JW'(1); st_q <= C_DIV_GO; end
        end
        C_ENC_WAIT: if (enc_done) begin enroll_done <= 1'b1; st_q <= C_IDLE; end
        C_DIV_GO: begin
          if (first_q[j_q] == j_q) st_q <= C_DIV_WAIT;
          else begin
            // same minimal polynomial as an earlier j: same remainder
            srem_q[j_q] <= srem_q[first_q[j_q]];
            if (j_q == JW'(2 * T)) begin j_q <= JW'(1); st_q <= C_RED_GO; end
            else j_q <= j_q + 1'b1;
          end
        end
        C_DIV_WAIT: if (dv_done) begin
          srem_q[j_q] <= dv_rem;
          if (j_q == JW'(2 * T)) begin j_q <= JW'(1); st_q <= C_RED_GO; end
          else begin j_q <= j_q + 1'b1; st_q <= C_DIV_GO; end
        end
        C_RED_GO: st_q <= C_RED_WAIT;
        C_RED_WAIT: if (sr_done) begin
          svec_q[j_q]     <= sr_vec;
          syn_pow_o[j_q]  <= sr_pow;
          syn_zero_o[j_q] <= sr_zero;
          if (j_q == JW'(2 * T)) st_q <= C_BM_GO;
          else begin j_q <= j_q + 1'b1; st_q <= C_RED_GO; end
        end
        C_BM_GO: begin
          if (!any_nonzero) begin
            // every syndrome is zero: the word is a code word
            err_detected <= 1'b0;
            auth_id_o    <= auth_id;
            auth_nerr    <= '0;
            auth_fail    <= 1'b0;
            auth_done    <= 1'b1;
            st_q         <= C_IDLE;
          end else begin
            err_detected <= 1'b1;
            st_q         <= C_BM_WAIT;
          end
        end
        C_BM_WAIT: if (bm_done) begin
          if (bm_nerr > LW'(T)) begin
            auth_id_o <= auth_id;
            auth_nerr <= bm_nerr;
            auth_fail <= 1'b1;
            auth_done <= 1'b1;
            st_q      <= C_IDLE;
          end else st_q <= C_CH_GO;
        end
        C_CH_GO: st_q <= C_CH_WAIT;
        C_CH_WAIT: if (ch_done) begin
          auth_nerr <= bm_nerr;
          if (ch_nroots != PW'(bm_nerr)) begin
            auth_id_o <= auth_id;
            auth_fail <= 1'b1;
          end else begin
            auth_id_o <= auth_id ^ id_mask[K-1:0];
            auth_fail <= 1'b0;
          end
          auth_done <= 1'b1;
          st_q      <= C_IDLE;
        end
        default: st_q <= C_IDLE;
      endcase
    end
  end

  // Every unit is started only while it is idle.
  a_unit_idle_at_start: assert property (@(posedge clk) disable iff (!rst_n)
    !((mp_start && mp_busy) || (gm_start && gm_busy) || (enc_start && enc_busy) ||
      (dv_start && dv_busy) || (sr_start && sr_busy) || (bm_start && bm_busy) ||
      (ch_start && ch_busy)));

  // The shared element-table port is never claimed by both users at once.
  a_table_port_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(mp_ten && sr_ten));

  // One operation at a time: enrollment and authentication never start together.
  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == C_IDLE) |-> !(enroll_start && auth_start));

endmodule
