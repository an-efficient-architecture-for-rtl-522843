// apt_final_thresh: final threshold computation and stopping rule.
//
// Compares the 16 block maxima and keeps the overall largest score (the
// lowest block wins a tie, so the smallest t wins overall). It then applies
// the Cumulative Limiting Factor rule CLF = sigma_B^2/sigma_T^2 <=
// alpha*mu_T/sigma_T^2, in which sigma_T^2 cancels, i.e.
//   sigma_B^2 <= alpha * mu_T      (mu_T: mean gray level of the sub-image)
// In the log domain, with score = log2(sigma_B^2) + 2*log2(W_T) and
// mu_T = U_T / W_T, this becomes
//   score <= log2(alpha_q * U_T) - ALPHA_FRAC + log2(W_T)
// which needs one small multiplier (alpha times U_T) and two more LCUs that
// share this unit's table. alpha is unsigned with ALPHA_FRAC = 4 fraction
// bits (9.8 is coded 157). The stopping rule is the reference algorithm's;
// its log-domain form, the alpha format and the tie rule are this design's.
//
// Outputs (registered, valid in the clock after eval): best_valid (some
// block found a candidate), best_t, stop (CLF rule met) and log_sb2 =
// log2(sigma_B^2) of the best candidate, signed, FRAC_W fraction bits.
// W_T, U_T and alpha must be stable while eval is high. rst_n: active-low,
// synchronous.
module apt_final_thresh
  import apt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                eval,
  input  logic                blk_valid [NBLK],
  input  score_t              blk_score [NBLK],
  input  logic [PIX_W-1:0]    blk_t     [NBLK],
  input  logic [W_W-1:0]      w_tot,
  input  logic [U_W-1:0]      u_tot,
  input  logic [ALPHA_W-1:0]  alpha,
  input  logic                cfg_we,
  input  logic [LUT_AW-1:0]   cfg_addr,
  input  lut_word_t           cfg_wdata,
  output logic                res_valid,
  output logic                best_valid,
  output logic [PIX_W-1:0]    best_t,
  output logic                stop,
  output score_t              log_sb2
);

  localparam int unsigned AU_W = ALPHA_W + U_W;

  lut_word_t lut [LUT_N];
  lcu_lut u_lut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .lut);

  // Maximum over the blocks
  logic             m_valid;
  score_t           m_score;
  logic [PIX_W-1:0] m_t;
  always_comb begin
    m_valid = 1'b0;
    m_score = '0;
    m_t     = '0;
    for (int b = 0; b < int'(NBLK); b++)
      if (blk_valid[b] && (!m_valid || blk_score[b] > m_score)) begin
        m_valid = 1'b1;
        m_score = blk_score[b];
        m_t     = blk_t[b];
      end
  end

  // Limit alpha*U_T in the log domain
  logic [AU_W-1:0]               au;
  logic [$clog2(AU_W)+FRAC_W-1:0] l_au;
  logic [LW16-1:0]               l_wt;
  logic                          z_au, z_wt;
  assign au = AU_W'(alpha) * AU_W'(u_tot);
  lcu #(.IN_W(AU_W)) u_lcu_au (.q(au),          .lut, .log_q(l_au), .zero(z_au));
  lcu #(.IN_W(16))   u_lcu_wt (.q(16'(w_tot)),  .lut, .log_q(l_wt), .zero(z_wt));

  score_t limit;
  assign limit = score_t'(l_au) + score_t'(l_wt)
               - score_t'(ALPHA_FRAC << FRAC_W);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid  <= 1'b0;
      best_valid <= 1'b0;
      best_t     <= '0;
      stop       <= 1'b0;
      log_sb2    <= '0;
    end else begin
      res_valid <= eval;
      if (eval) begin
        best_valid <= m_valid;
        best_t     <= m_t;
        // alpha*U_T == 0 means no limit: the rule never stops the recursion
        stop       <= m_valid && !z_au && !z_wt && (m_score <= limit);
        log_sb2    <= m_score - (score_t'(l_wt) <<< 1);
      end
    end
  end

endmodule
