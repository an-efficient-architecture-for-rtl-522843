// apt_pkg: sizes, types and the default logarithm table shared by the
// adaptive progressive thresholding (APT) engine.
//
// Image: 8-bit gray levels, 256x256 pixels (N = 2^16), as in the reference
// design. The 256 gray levels are split over 16 parallel blocks of 16
// registers each. Normalised operands are w*1024 and mu*1024, obtained from
// the raw cumulative sums by a constant right shift of 6 bits.
//
// Logarithms are unsigned fixed point: integer characteristic j above a
// 12-bit fraction (this fraction width is a choice of this design; it makes
// one table word beta(12) + D_A(7) + D_B(5) + D_C(3) + D_D(1) = 28 bits, so
// a 16-entry table holds 448 bits, the table size quoted for a 16-bit LCU).
package apt_pkg;

  localparam int unsigned PIX_W     = 8;               // gray level bits
  localparam int unsigned LEVELS    = 1 << PIX_W;      // L = 256
  localparam int unsigned N_LOG2    = 16;              // 256x256 pixels
  localparam int unsigned NORM_LOG2 = 10;              // operands scaled by 1024
  localparam int unsigned NORM_SH   = N_LOG2 - NORM_LOG2;  // right shift of 6
  localparam int unsigned NBLK      = 16;              // parallel blocks
  localparam int unsigned BLK_DEPTH = LEVELS / NBLK;   // registers per block
  localparam int unsigned BLK_AW    = $clog2(BLK_DEPTH);

  localparam int unsigned C_W = N_LOG2 + 1;            // pixel count 0..65536
  localparam int unsigned S_W = N_LOG2 + PIX_W;        // intensity sum < 255*2^16
  localparam int unsigned W_W = C_W - NORM_SH;         // normalised w, 0..1024
  localparam int unsigned U_W = S_W - NORM_SH;         // normalised mu
  localparam int unsigned P_W = W_W + U_W;             // w*mu_T and mu_t*W_T

  // Logarithm conversion
  localparam int unsigned FRAC_W  = 12;                // log fraction bits
  localparam int unsigned LUT_AW  = 4;                 // q_{j-1}..q_{j-4}
  localparam int unsigned LUT_N   = 1 << LUT_AW;
  localparam int unsigned BETA_W  = 12;
  localparam int unsigned DA_W    = 7;
  localparam int unsigned DB_W    = 5;
  localparam int unsigned DC_W    = 3;
  localparam int unsigned DD_W    = 1;

  typedef struct packed {
    logic [BETA_W-1:0] beta;   // log2(1+k/16) (plus half the segment bow)
    logic [DA_W-1:0]   da;     // slope * 2^-6  in 2^-12 units
    logic [DB_W-1:0]   db;     // slope * 2^-8
    logic [DC_W-1:0]   dc;     // slope * 2^-10
    logic [DD_W-1:0]   dd;     // slope * 2^-12
  } lut_word_t;

  // Default contents, entry k (k = q_{j-1..j-4}):
  //   s_k   = 16*(log2(1+(k+1)/16) - log2(1+k/16))        secant slope
  //   bow_k = max over the segment of log2(1+x) minus the secant
  //   beta  = round(4096*(log2(1+k/16) + bow_k/2))
  //   D_A = round(64*s_k), D_B = round(16*s_k), D_C = round(4*s_k), D_D = round(s_k)
  localparam lut_word_t LUT_DEFAULT [LUT_N] = '{
    28'h001b56d, 28'h167a95b, 28'h2b9a14b, 28'h3f8993b,
    28'h527912b, 28'h6488b19, 28'h75b8509, 28'h8617f09,
    28'h95d78f9, 28'ha4e74e9, 28'hb3670e7, 28'hc156cd7,
    28'hceb68d7, 28'hdbb64d7, 28'he8360c7, 28'hf455ec7
  };

  // Log widths of the three LCU sizes used
  localparam int unsigned LW16 = 4 + FRAC_W;           // 16-bit operand
  localparam int unsigned LWP  = $clog2(P_W) + FRAC_W; // product-size operand

  // log2(sigma_B^2) score, signed
  localparam int unsigned SC_W = LWP + 3;
  typedef logic signed [SC_W-1:0] score_t;

  // Limiting parameter alpha, unsigned fixed point with 4 fraction bits
  localparam int unsigned ALPHA_W    = 10;
  localparam int unsigned ALPHA_FRAC = 4;

  // Why the recursion ended
  typedef enum logic [1:0] {
    STOP_NONE  = 2'd0,   // not finished yet
    STOP_CLF   = 2'd1,   // CLF rule met: the last threshold is the result
    STOP_EMPTY = 2'd2,   // sub-image has no valid split left
    STOP_MAXIT = 2'd3    // iteration limit reached
  } stop_t;

endpackage
