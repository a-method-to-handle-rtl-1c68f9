// syndrome_reduce: evaluates a syndrome polynomial at alpha^j and returns the
// result as a power of alpha.
//
// S_j = S_j(alpha^j) = sum over the set bits l of S_j(x) of alpha^(l*j). The
// block walks l = 0..M-1, keeping the exponent l*j as a running power that a
// gf_pow_mul multiplies by alpha^j each step; for every set bit it reads the
// binary-vector form of alpha^(l*j) from the GF element table and XORs it into
// an accumulator. It then searches the table for the address whose contents
// equal the sum: that address is the power of alpha of the syndrome. A zero
// sum has no power and is reported by `syn_zero`.
//
// Interface: pulse `start` with `spoly` and `j` stable until `done`. `done`
// pulses when syn_vec (binary form), syn_pow and syn_zero are valid; they hold
// until the next start. The table is read through tab_en/tab_addr with
// tab_data one cycle later. Timing: M+2 cycles for the evaluation plus, for a
// non-zero syndrome, syn_pow+2 cycles of search (at most 2^M+1).
//
// Evaluation through the table and the search for the matching power follow
// the source design; the handshake and the running exponent are this
// design's own.
module syndrome_reduce #(
  parameter int unsigned M = bch_pkg::GF_M,
  localparam int unsigned N = (1 << M) - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] spoly,
  input  logic [M-1:0] j,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] syn_vec,
  output logic [M-1:0] syn_pow,
  output logic         syn_zero,
  output logic         tab_en,
  output logic [M-1:0] tab_addr,
  input  logic [M-1:0] tab_data
);

  typedef enum logic [1:0] {S_IDLE, S_EVAL, S_SEARCH} state_t;

  state_t       st_q;
  logic [M-1:0] sp_q, j_q;
  logic [M-1:0] l_q;        // evaluation step / search address
  logic [M-1:0] pw_q;       // l*j mod N
  logic [M-1:0] acc_q;
  logic         pend_q;     // table data of the previous cycle is needed
  logic [M-1:0] pw_next;
  logic [M-1:0] acc_fin;

  gf_pow_mul #(.M(M)) u_step (
    .a_pow(pw_q), .a_zero(1'b0), .b_pow(j_q), .b_zero(1'b0), .div(1'b0),
    .y_pow(pw_next), .y_zero(), .div_by_zero());

  assign busy    = (st_q != S_IDLE);
  assign acc_fin = pend_q ? (acc_q ^ tab_data) : acc_q;

  always_comb begin
    tab_en   = 1'b0;
    tab_addr = pw_q;
    case (st_q)
      S_EVAL:   begin tab_en = (l_q < M'(M)) && sp_q[0]; tab_addr = pw_q; end
      S_SEARCH: begin tab_en = 1'b1;                      tab_addr = l_q;  end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_IDLE;
      sp_q     <= '0;
      j_q      <= '0;
      l_q      <= '0;
      pw_q     <= '0;
      acc_q    <= '0;
      pend_q   <= 1'b0;
      done     <= 1'b0;
      syn_vec  <= '0;
      syn_pow  <= '0;
      syn_zero <= 1'b1;
    end else begin
      done <= 1'b0;
      case (st_q)
        S_IDLE: begin
          if (start) begin
            sp_q   <= spoly;
            j_q    <= (j == M'(N)) ? '0 : j;
            l_q    <= '0;
            pw_q   <= '0;
            acc_q  <= '0;
            pend_q <= 1'b0;
            st_q   <= S_EVAL;
          end
        end
        S_EVAL: begin
          acc_q  <= acc_fin;
          pend_q <= tab_en;
          sp_q   <= sp_q >> 1;
          pw_q   <= pw_next;
          l_q    <= l_q + 1'b1;
          if (l_q == M'(M)) begin
            // drain cycle: the last read has been accumulated
            syn_vec <= acc_fin;
            pend_q  <= 1'b0;
            l_q     <= '0;
            if (acc_fin == '0) begin
              syn_zero <= 1'b1;
              syn_pow  <= '0;
              done     <= 1'b1;
              st_q     <= S_IDLE;
            end else begin
              syn_zero <= 1'b0;
              st_q     <= S_SEARCH;
            end
          end
        end
        S_SEARCH: begin
          // tab_data holds alpha^(l-1) when pend_q is set
          pend_q <= 1'b1;
          l_q    <= l_q + 1'b1;
          if (pend_q && tab_data == syn_vec) begin
            syn_pow <= l_q - 1'b1;
            done    <= 1'b1;
            st_q    <= S_IDLE;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // Every non-zero element appears in the table, so the search always ends
  // before the address wraps.
  a_search_ends: assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == S_SEARCH && pend_q) |-> (l_q != '0));

endmodule
