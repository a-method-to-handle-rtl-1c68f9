// gf_minpoly: computes the minimal polynomial m_i(x) of alpha^i over GF(2).
//
// m_i(x) is the product of (x + alpha^p) over the cyclotomic coset
// p = i, 2i, 4i, ... (mod 2^M-1). The block is built for small area and works
// sequentially:
//   1. Coset: the powers are produced by doubling modulo 2^M-1 and written to
//      a power-of-alpha memory (M x M). A 2^M x 1 "valid" memory marks every
//      power already taken; the coset is closed when a power repeats.
//   2. Product: the running product is held in two ping-pong coefficient
//      memories (DEPTH x 2^M bits). Word a holds the coefficient of x^a as a
//      formal sum of powers of alpha, one bit per power. Multiplying by
//      (x + alpha^p) gives new[a] = old[a]*alpha^p + old[a-1]; the product
//      with alpha^p moves every set bit of old[a] up by p positions (mod
//      2^M-1), done one bit per cycle, and the sum is a bitwise XOR (equal
//      powers cancel). Each factor reads one memory and writes the other.
//   3. Reduction: each coefficient's powers are translated through the GF
//      element table (power -> binary vector) and XORed together; the result
//      is 0 or 1 and becomes one bit of m_i(x).
//
// Interface: pulse `start` with `idx` = i while `busy` is low. `done` pulses
// for one cycle when `poly` (bit a = coefficient of x^a) and `deg` are valid;
// they hold until the next start. The block reads the element table through
// tab_en/tab_addr and expects tab_data one cycle later.
// Timing: 2^M cycles to clear the valid memory, about 2 cycles per coset
// element, about (a_max+2)(2^M+3) cycles per factor, and (deg+1)(2^M+3)
// cycles for the reduction.
//
// The memories, their sizes' role, the bit-per-power coefficient format, the
// ping-pong use of the two memories and the per-bit shifting follow the
// source design. The depth of the coefficient memories (2M words, enough for
// degree M), the handshake and the clearing of the valid memory at each start
// are this design's own.
module gf_minpoly #(
  parameter int unsigned M     = bch_pkg::GF_M,
  parameter int unsigned DEPTH = 2 * M,
  localparam int unsigned N    = (1 << M) - 1,
  localparam int unsigned W    = 1 << M,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned DW   = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [M-1:0]  idx,
  output logic          busy,
  output logic          done,
  output logic [M:0]    poly,
  output logic [DW-1:0] deg,
  output logic          tab_en,
  output logic [M-1:0]  tab_addr,
  input  logic [M-1:0]  tab_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_CS_RD, S_CS_CHK, S_INIT_RD, S_INIT_W,
    S_MP_RD, S_MP_LAT, S_RD_CUR, S_LAT_CUR, S_SHIFT, S_RD_PREV, S_WR,
    S_RD_R, S_LAT_R, S_SCAN
  } state_t;

  state_t        st_q;
  logic [M-1:0]  p_q;        // current power (coset walk / factor power)
  logic [M-1:0]  cnt_q;      // coset size so far
  logic [M-1:0]  f_q;        // index of the factor being multiplied in
  logic [AW-1:0] a_q;        // coefficient address
  logic [M-1:0]  j_q;        // bit index of the source coefficient
  logic [M-1:0]  k_q;        // (j + p) mod N, target bit index
  logic [W-1:0]  coef_q;     // source coefficient
  logic [W-1:0]  reg_q;      // coefficient being built
  logic          sel_q;      // 0: read A / write B, 1: read B / write A
  logic [M-1:0]  acc_q;      // reduction accumulator
  logic          pend_q;     // a table read is in flight
  logic          first_q;    // first of the two initial writes

  // Memory ports
  logic          v_we, v_re, v_rd;
  logic [M-1:0]  v_waddr, v_raddr;
  logic          v_wdata;
  logic          pw_we, pw_re;
  logic [$clog2(M)-1:0] pw_waddr, pw_raddr;
  logic [M-1:0]  pw_wdata, pw_rd;
  logic          c_we, c_re;
  logic [AW-1:0] c_waddr, c_raddr;
  logic [W-1:0]  c_wdata, ca_rd, cb_rd, c_rd;
  logic          c_wsel;     // 0: write A, 1: write B

  logic [M-1:0]  p_dbl;
  logic [M-1:0]  acc_fin;

  // 2p mod (2^M-1) is a rotate left by one bit.
  assign p_dbl   = {p_q[M-2:0], p_q[M-1]};
  assign c_rd    = sel_q ? cb_rd : ca_rd;
  assign acc_fin = pend_q ? (acc_q ^ tab_data) : acc_q;
  assign busy    = (st_q != S_IDLE);

  always_comb begin
    v_we = 1'b0; v_waddr = p_q; v_wdata = 1'b1;
    v_re = 1'b0; v_raddr = p_q;
    pw_we = 1'b0; pw_waddr = cnt_q[$clog2(M)-1:0]; pw_wdata = p_q;
    pw_re = 1'b0; pw_raddr = f_q[$clog2(M)-1:0];
    c_we = 1'b0; c_waddr = a_q; c_wdata = reg_q; c_wsel = ~sel_q;
    c_re = 1'b0; c_raddr = a_q;
    tab_en = 1'b0; tab_addr = j_q;
    case (st_q)
      S_CLR: begin
        v_we = 1'b1; v_waddr = j_q; v_wdata = 1'b0;
      end
      S_CS_RD:  v_re = 1'b1;
      S_CS_CHK: begin
        if (!v_rd && (cnt_q != M[M-1:0])) begin
          v_we  = 1'b1;
          pw_we = 1'b1;
        end
      end
      S_INIT_RD: pw_re = 1'b1;
      S_INIT_W: begin
        // Initial product x + alpha^p0 goes to memory A.
        c_we    = 1'b1;
        c_wsel  = 1'b0;
        c_waddr = first_q ? AW'(0) : AW'(1);
        c_wdata = first_q ? (W'(1) << pw_rd) : W'(1);
      end
      S_MP_RD:  pw_re = 1'b1;
      S_RD_CUR: c_re = 1'b1;
      S_RD_PREV: begin
        c_re    = 1'b1;
        c_raddr = a_q - 1'b1;
      end
      S_WR: begin
        c_we    = 1'b1;
        c_wdata = (a_q != '0) ? (reg_q ^ c_rd) : reg_q;
      end
      S_RD_R:  c_re = 1'b1;
      S_SCAN: begin
        tab_en   = coef_q[j_q];
        tab_addr = j_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      p_q     <= '0;
      cnt_q   <= '0;
      f_q     <= '0;
      a_q     <= '0;
      j_q     <= '0;
      k_q     <= '0;
      coef_q  <= '0;
      reg_q   <= '0;
      sel_q   <= 1'b0;
      acc_q   <= '0;
      pend_q  <= 1'b0;
      first_q <= 1'b0;
      done    <= 1'b0;
      poly    <= '0;
      deg     <= '0;
    end else begin
      done <= 1'b0;
      case (st_q)
        S_IDLE: begin
          if (start) begin
            p_q   <= idx;
            cnt_q <= '0;
            j_q   <= '0;
            poly  <= '0;
            st_q  <= S_CLR;
          end
        end
        // Clear the valid memory, one word per cycle.
        S_CLR: begin
          j_q <= j_q + 1'b1;
          if (j_q == M'(N)) st_q <= S_CS_RD;
        end
        S_CS_RD: st_q <= S_CS_CHK;
        S_CS_CHK: begin
          if (v_rd || (cnt_q == M[M-1:0])) begin
            deg     <= DW'(cnt_q);
            f_q     <= '0;
            first_q <= 1'b1;
            st_q    <= S_INIT_RD;
          end else begin
            cnt_q <= cnt_q + 1'b1;
            p_q   <= p_dbl;
            st_q  <= S_CS_RD;
          end
        end
        S_INIT_RD: st_q <= S_INIT_W;
        S_INIT_W: begin
          first_q <= 1'b0;
          if (!first_q) begin
            sel_q <= 1'b0;
            f_q   <= M'(1);
            st_q  <= (cnt_q == M'(1)) ? S_RD_R : S_MP_RD;
            a_q   <= '0;
          end
        end
        // Multiply the product of factors 0..f-1 (degree f) by (x + alpha^p).
        S_MP_RD:  st_q <= S_MP_LAT;
        S_MP_LAT: begin
          p_q  <= pw_rd;
          a_q  <= '0;
          st_q <= S_RD_CUR;
        end
        S_RD_CUR: st_q <= S_LAT_CUR;
        S_LAT_CUR: begin
          coef_q <= (a_q <= AW'(f_q)) ? c_rd : '0;
          reg_q  <= '0;
          j_q    <= '0;
          k_q    <= p_q;
          st_q   <= S_SHIFT;
        end
        S_SHIFT: begin
          if (coef_q[j_q]) reg_q[k_q] <= 1'b1;
          j_q <= j_q + 1'b1;
          k_q <= (k_q == M'(N - 1)) ? '0 : k_q + 1'b1;
          if (j_q == M'(N - 1)) st_q <= S_RD_PREV;
        end
        S_RD_PREV: st_q <= S_WR;
        S_WR: begin
          if (a_q == AW'(f_q + 1'b1)) begin
            sel_q <= ~sel_q;
            a_q   <= '0;
            f_q   <= f_q + 1'b1;
            st_q  <= (f_q + 1'b1 == cnt_q) ? S_RD_R : S_MP_RD;
          end else begin
            a_q  <= a_q + 1'b1;
            st_q <= S_RD_CUR;
          end
        end
        // Reduce coefficient a to a binary value through the element table.
        S_RD_R: st_q <= S_LAT_R;
        S_LAT_R: begin
          coef_q <= c_rd;
          acc_q  <= '0;
          pend_q <= 1'b0;
          j_q    <= '0;
          st_q   <= S_SCAN;
        end
        S_SCAN: begin
          acc_q  <= acc_fin;
          pend_q <= (j_q == M'(N)) ? 1'b0 : coef_q[j_q];
          j_q    <= j_q + 1'b1;
          if (j_q == M'(N)) begin
            // j = N is a drain cycle: bit N of a coefficient is never set.
            poly[a_q] <= acc_fin[0];
            if (a_q == AW'(cnt_q)) begin
              done <= 1'b1;
              st_q <= S_IDLE;
            end else begin
              a_q  <= a_q + 1'b1;
              st_q <= S_RD_R;
            end
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // A reduced coefficient of a minimal polynomial is always 0 or 1.
  a_binary_coef: assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == S_SCAN && j_q == M'(N)) |-> (acc_fin[M-1:1] == '0));

  sdp_ram #(.DEPTH(W), .WIDTH(1)) u_valid (
    .clk(clk), .we(v_we), .wr_addr(v_waddr), .wr_data(v_wdata),
    .re(v_re), .rd_addr(v_raddr), .rd_data(v_rd));

  sdp_ram #(.DEPTH(M), .WIDTH(M)) u_pow (
    .clk(clk), .we(pw_we), .wr_addr(pw_waddr), .wr_data(pw_wdata),
    .re(pw_re), .rd_addr(pw_raddr), .rd_data(pw_rd));

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(W)) u_coef_a (
    .clk(clk), .we(c_we && !c_wsel), .wr_addr(c_waddr), .wr_data(c_wdata),
    .re(c_re), .rd_addr(c_raddr), .rd_data(ca_rd));

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(W)) u_coef_b (
    .clk(clk), .we(c_we && c_wsel), .wr_addr(c_waddr), .wr_data(c_wdata),
    .re(c_re), .rd_addr(c_raddr), .rd_data(cb_rd));

endmodule
