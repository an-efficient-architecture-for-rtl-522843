// apt_top: adaptive progressive thresholding (APT) engine for 256x256,
// 8-bit gray-level frames.
//
// APT applies Otsu's threshold selection recursively: the threshold t that
// maximises the between-class variance sigma_B^2 is found, the dark class
// {0..t} is treated as a new image and split again, until the Cumulative
// Limiting Factor rule sigma_B^2 <= alpha * mu_T says the last split is no
// longer worth making. This engine evaluates sigma_B^2 in the log domain
// with LUT-based logarithm conversion units, so it needs no divider and only
// small multipliers.
//
// Structure (as in the reference architecture): a cumulative histogram /
// cumulative intensity area unit (apt_hist_cum), 16 parallel
// between-class-variance blocks of 16 thresholds each (bcv_block, each with
// its own 448-bit reconfigurable table), and a final threshold unit
// (apt_final_thresh). apt_ctrl sequences frame input, cumulation and the
// iterations.
//
// Interface: pulse start while idle, then stream exactly 65536 pixels with a
// valid/ready handshake (pix_ready high while pixels are taken, one per
// clock). done rises when the result is ready (thresh, found, iterations,
// reason, log_sb2) and stays high until the next start. alpha is the
// limiting parameter, unsigned with 4 fraction bits; it must be stable while
// busy. lut_we/lut_addr/lut_wdata rewrite one word of all 17 tables at
// once; write them only while idle. Timing: 65536 clocks of pixels (at one
// per clock), 256 clocks of cumulation, then 24 clocks per iteration.
// rst_n: active-low, synchronous.
module apt_top
  import apt_pkg::*;
#(
  parameter int unsigned MAX_ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                pix_valid,
  input  logic [PIX_W-1:0]    pix,
  output logic                pix_ready,
  input  logic [ALPHA_W-1:0]  alpha,
  input  logic                lut_we,
  input  logic [LUT_AW-1:0]   lut_addr,
  input  lut_word_t           lut_wdata,
  output logic                busy,
  output logic                done,
  output logic [PIX_W-1:0]    thresh,
  output logic                found,
  output logic [4:0]          iterations,
  output stop_t               reason,
  output score_t              log_sb2
);

  logic              hist_clear, hist_ready;
  logic [BLK_AW-1:0] blk_addr [NBLK];
  logic [C_W-1:0]    ch_rd    [NBLK];
  logic [S_W-1:0]    cia_rd   [NBLK];
  logic [PIX_W-1:0]  top_idx;
  logic [C_W-1:0]    ch_top;
  logic [S_W-1:0]    cia_top;

  logic              blk_start;
  logic [PIX_W-1:0]  t_upper;
  logic [W_W-1:0]    w_tot;
  logic [U_W-1:0]    u_tot;
  logic [NBLK-1:0]   blk_done;
  logic              blk_valid [NBLK];
  score_t            blk_score [NBLK];
  logic [PIX_W-1:0]  blk_t     [NBLK];

  logic              eval, res_valid, best_valid, stop;
  logic [PIX_W-1:0]  best_t;
  score_t            res_log_sb2;

  apt_hist_cum u_hist (
    .clk, .rst_n,
    .clear     (hist_clear),
    .pix_valid, .pix, .pix_ready,
    .ready     (hist_ready),
    .blk_addr, .ch_rd, .cia_rd,
    .top_idx, .ch_top, .cia_top
  );

  for (genvar b = 0; b < int'(NBLK); b++) begin : g_blk
    bcv_block #(.BLK(b)) u_bcv (
      .clk, .rst_n,
      .start     (blk_start),
      .t_upper, .w_tot, .u_tot,
      .rd_addr   (blk_addr[b]),
      .ch_rd     (ch_rd[b]),
      .cia_rd    (cia_rd[b]),
      .cfg_we    (lut_we),
      .cfg_addr  (lut_addr),
      .cfg_wdata (lut_wdata),
      .done      (blk_done[b]),
      .max_valid (blk_valid[b]),
      .max_score (blk_score[b]),
      .max_t     (blk_t[b])
    );
  end

  apt_final_thresh u_final (
    .clk, .rst_n, .eval,
    .blk_valid, .blk_score, .blk_t,
    .w_tot, .u_tot, .alpha,
    .cfg_we (lut_we), .cfg_addr (lut_addr), .cfg_wdata (lut_wdata),
    .res_valid, .best_valid, .best_t, .stop,
    .log_sb2 (res_log_sb2)
  );

  apt_ctrl #(.MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .hist_clear, .hist_ready, .top_idx, .ch_top, .cia_top,
    .blk_start, .t_upper, .w_tot, .u_tot, .blk_done,
    .eval, .res_valid, .best_valid, .best_t, .stop, .res_log_sb2,
    .thresh, .found, .iterations, .reason, .log_sb2
  );

endmodule
