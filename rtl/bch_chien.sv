// bch_chien: Chien search over the positions of the shortened code word.
//
// Position p of the received word (the coefficient of x^p) is in error when
// Lambda(alpha^-p) = 0. The block keeps one term per coefficient,
// t_i = Lambda_i * alpha^(-i*p), starting from t_i = Lambda_i at p = 0; each
// cycle it tests whether the terms sum to zero and multiplies every t_i by
// the constant alpha^-i (T+1 multipliers working in parallel). Because the
// code is binary, every error value is 1: the error pattern is simply the set
// of positions found.
//
// Interface: pulse `start` with `lambda` and `len` (the number of positions,
// K plus the helper length) stable until `done`; after len cycles `done`
// pulses and `err_mask` (bit p = position p in error) and `nroots` hold until
// the next start.
//
// The source design names these steps (find the roots of the error-locator
// polynomial, correct the errors) without their insides; the Chien search is
// this design's own choice.
module bch_chien #(
  parameter int unsigned M    = bch_pkg::GF_M,
  parameter int unsigned PRIM = bch_pkg::GF_PRIM,
  parameter int unsigned T    = bch_pkg::BCH_T,
  parameter int unsigned K    = bch_pkg::BCH_K,
  localparam int unsigned L   = K + T * M,
  localparam int unsigned PW  = $clog2(L + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [M-1:0]  lambda [0:T],
  input  logic [PW-1:0] len,
  output logic          busy,
  output logic          done,
  output logic [L-1:0]  err_mask,
  output logic [PW-1:0] nroots
);

  // alpha^e as a binary vector, for the constant multipliers.
  function automatic logic [M-1:0] alpha_pow(input int unsigned e);
    logic [M:0] r;
    r = (M+1)'(1);
    for (int unsigned k = 0; k < e; k++) begin
      r = {r[M-1:0], 1'b0};
      if (r[M]) r = r ^ PRIM[M:0];
    end
    return r[M-1:0];
  endfunction

  localparam int unsigned N = (1 << M) - 1;

  logic [M-1:0]  term_q [0:T];
  logic [M-1:0]  term_n [0:T];
  logic [M-1:0]  sum;
  logic [PW-1:0] p_q;
  logic          run_q;

  for (genvar i = 0; i <= T; i++) begin : g_term
    localparam logic [M-1:0] STEP = alpha_pow((N - (i % N)) % N);
    gf_mul_vec #(.M(M), .PRIM(PRIM)) u_mul (.a(term_q[i]), .b(STEP), .y(term_n[i]));
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i <= T; i++) sum = sum ^ term_q[i];
  end

  assign busy = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q    <= 1'b0;
      done     <= 1'b0;
      p_q      <= '0;
      err_mask <= '0;
      nroots   <= '0;
      for (int i = 0; i <= T; i++) term_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          for (int i = 0; i <= T; i++) term_q[i] <= lambda[i];
          p_q      <= '0;
          err_mask <= '0;
          nroots   <= '0;
          run_q    <= (len != '0);
          done     <= (len == '0);
        end
      end else begin
        for (int i = 0; i <= T; i++) term_q[i] <= term_n[i];
        if (sum == '0) begin
          err_mask[p_q] <= 1'b1;
          nroots        <= nroots + 1'b1;
        end
        p_q <= p_q + 1'b1;
        if (p_q + 1'b1 == len) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

endmodule
