// bcv_block: one of the 16 parallel between-class-variance blocks.
//
// Block BLK covers the candidate thresholds t = 16*BLK .. 16*BLK+15. After
// start, its address counter steps through its 16 CH/CIA registers, one per
// clock, and every candidate below the current upper bound T flows down a
// four-stage pipeline that evaluates, in the log domain,
//   score(t) = 2*log2|W_t*U_T - U_t*W_T| - log2(W_t) - log2(W_T - W_t)
// where W = c >> 6 and U = s >> 6 are the cumulative count and intensity
// normalised to 1/1024 of the frame, and W_T, U_T are the totals of the
// current sub-image {0..T}. score(t) = log2(sigma_B^2(t)) + 2*log2(W_T), so
// within one iteration the t with the largest score maximises the
// between-class variance. Taking logarithms turns the squaring, the product
// w*(1-w) and both divisions into shifts and subtractions. The 6-bit
// normalising shifts, the logarithm form of sigma_B^2 and one LUT per block
// follow the reference architecture. Working with sub-image totals through
// two products (instead of a single w_t*mu_T product), and the pipeline
// depth, are this design's choices.
//
// A candidate is skipped when W_t = 0, W_T - W_t = 0 or the numerator is 0
// (sigma_B^2 is then undefined or zero). The block keeps the largest score
// and its t (the first t wins a tie). The upper four bits of max_t always
// equal BLK, so they are constant in a synthesised block.
//
// Timing: start is a one-clock pulse; addresses 0..15 are issued in the 16
// following clocks and done is set by the 20th clock edge after the edge
// that samples start (seen high in the 21st clock); max_* are stable while
// done is high. U_T, W_T and t_upper
// must stay constant from start until done. rst_n: active-low, synchronous.
module bcv_block
  import apt_pkg::*;
#(
  parameter int unsigned BLK = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [PIX_W-1:0]    t_upper,     // T: candidates t < T
  input  logic [W_W-1:0]      w_tot,       // W_T
  input  logic [U_W-1:0]      u_tot,       // U_T
  output logic [BLK_AW-1:0]   rd_addr,
  input  logic [C_W-1:0]      ch_rd,
  input  logic [S_W-1:0]      cia_rd,
  input  logic                cfg_we,
  input  logic [LUT_AW-1:0]   cfg_addr,
  input  lut_word_t           cfg_wdata,
  output logic                done,
  output logic                max_valid,
  output score_t              max_score,
  output logic [PIX_W-1:0]    max_t
);

  lut_word_t lut [LUT_N];
  lcu_lut u_lut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .lut);

  // Stage 0: address counter
  logic running;
  logic last0;
  assign last0 = running && (rd_addr == BLK_AW'(BLK_DEPTH - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      rd_addr <= '0;
    end else if (start) begin
      running <= 1'b1;
      rd_addr <= '0;
    end else if (running) begin
      rd_addr <= rd_addr + 1'b1;
      if (last0) running <= 1'b0;
    end
  end

  logic [PIX_W-1:0] t0;
  assign t0 = PIX_W'(BLK * BLK_DEPTH) + PIX_W'(rd_addr);

  // Stage 1: normalise (6-bit right shifts)
  logic             v1, l1;
  logic [PIX_W-1:0] t1;
  logic [W_W-1:0]   w1;
  logic [U_W-1:0]   u1;
  // Stage 2: products and W_T - W_t
  logic             v2, l2;
  logic [PIX_W-1:0] t2;
  logic [P_W-1:0]   d2;
  logic [W_W-1:0]   w2, e2;
  // Stage 3: logarithms
  logic             v3, l3;
  logic [PIX_W-1:0] t3;
  logic [LWP-1:0]   ld3;
  logic [LW16-1:0]  lw3, le3;
  // Stage 4: score
  logic             v4, l4;
  logic [PIX_W-1:0] t4;
  score_t           s4;

  logic [P_W-1:0] p_a, p_b;
  assign p_a = P_W'(w1) * P_W'(u_tot);
  assign p_b = P_W'(u1) * P_W'(w_tot);

  logic [LWP-1:0]  ld_c;
  logic [LW16-1:0] lw_c, le_c;
  logic            zd_c, zw_c, ze_c;
  lcu #(.IN_W(P_W)) u_lcu_d (.q(d2),             .lut, .log_q(ld_c), .zero(zd_c));
  lcu #(.IN_W(16))  u_lcu_w (.q(16'(w2)),        .lut, .log_q(lw_c), .zero(zw_c));
  lcu #(.IN_W(16))  u_lcu_e (.q(16'(e2)),        .lut, .log_q(le_c), .zero(ze_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {v1, l1, v2, l2, v3, l3, v4, l4} <= '0;
      t1 <= '0; w1 <= '0; u1 <= '0;
      t2 <= '0; d2 <= '0; w2 <= '0; e2 <= '0;
      t3 <= '0; ld3 <= '0; lw3 <= '0; le3 <= '0;
      t4 <= '0; s4 <= '0;
    end else begin
      v1 <= running && (t0 < t_upper);
      l1 <= last0;
      t1 <= t0;
      w1 <= W_W'(ch_rd >> NORM_SH);
      u1 <= U_W'(cia_rd >> NORM_SH);

      v2 <= v1;
      l2 <= l1;
      t2 <= t1;
      d2 <= (p_a >= p_b) ? p_a - p_b : p_b - p_a;
      w2 <= w1;
      e2 <= w_tot - w1;

      v3  <= v2 && !zd_c && !zw_c && !ze_c;
      l3  <= l2;
      t3  <= t2;
      ld3 <= ld_c;
      lw3 <= lw_c;
      le3 <= le_c;

      v4 <= v3;
      l4 <= l3;
      t4 <= t3;
      s4 <= (score_t'(ld3) <<< 1) - score_t'(lw3) - score_t'(le3);
    end
  end

  // Stage 5: running maximum of this block
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done      <= 1'b0;
      max_valid <= 1'b0;
      max_score <= '0;
      max_t     <= '0;
    end else if (start) begin
      done      <= 1'b0;
      max_valid <= 1'b0;
    end else begin
      if (v4 && (!max_valid || s4 > max_score)) begin
        max_valid <= 1'b1;
        max_score <= s4;
        max_t     <= t4;
      end
      if (l4) done <= 1'b1;
    end
  end

  // The iteration operands must not change while addresses are issued.
  a_operands_stable: assert property (@(posedge clk) disable iff (!rst_n)
    running |-> $stable(t_upper) && $stable(w_tot) && $stable(u_tot));

endmodule
