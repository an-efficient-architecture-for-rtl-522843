// lcu: binary logarithm conversion unit (combinational).
//
// For an unsigned operand Q with leading one at bit j, Q = 2^j * (1 + x) and
// log2(Q) = j + log2(1 + x). The characteristic j comes from a leading-one
// detector. A barrel shifter aligns the 12 bits below the leading one (zeros
// are appended when fewer than 12 bits remain; lower bits are dropped):
//   f = q[j-1 .. j-12]
// f[11:8] addresses the table and gives beta (the fractional log at the
// segment start); the remaining bits form four 2-bit groups Z_A..Z_D that
// each select 0, D, 2D or 3D = 2D + D of the matching table slope word, so
//   log2(Q) ~= j + beta + D_A*Z_A + D_B*Z_B + D_C*Z_C + D_D*Z_D
// with no multiplier. The segmenting, the table address and the 0/D/2D/3D
// selection follow the reference algorithm; the 12-bit fraction and the
// saturation of the fraction at 4095/4096 are this design's choices.
//
// Interface: q (IN_W bits), lut (the 16-word table, from lcu_lut);
// log_q = {j, fraction}, unsigned, $clog2(IN_W) integer bits over FRAC_W
// fraction bits; zero = 1 when q == 0 (log_q is then 0 and meaningless).
// Timing: purely combinational, no clock.
module lcu
  import apt_pkg::*;
#(
  parameter int unsigned IN_W = 16
) (
  input  logic [IN_W-1:0]                   q,
  input  lut_word_t                         lut [LUT_N],
  output logic [$clog2(IN_W)+FRAC_W-1:0]    log_q,
  output logic                              zero
);

  localparam int unsigned CW = $clog2(IN_W);

  logic [CW-1:0]          j;
  logic [IN_W+FRAC_W-1:0] ext;
  logic [FRAC_W-1:0]      f;
  lut_word_t              w;
  logic [1:0]             za, zb, zc, zd;
  logic [FRAC_W:0]        frac;       // one spare bit for the carry

  // Leading-one detector: the last assignment is the highest set bit.
  always_comb begin
    j = '0;
    for (int i = 0; i < int'(IN_W); i++)
      if (q[i]) j = CW'(i);
  end

  assign zero = (q == '0);

  // Barrel shifter: bit q[j-1] lands at f[11], q[j-12] at f[0].
  assign ext = {q, {FRAC_W{1'b0}}};
  assign f   = FRAC_W'(ext >> j);

  assign w  = lut[f[FRAC_W-1 -: LUT_AW]];
  assign za = f[7:6];
  assign zb = f[5:4];
  assign zc = f[3:2];
  assign zd = f[1:0];

  // Four-input multiplexer replacing D*Z: 0, D, 2D or 2D+D.
  function automatic logic [FRAC_W:0] times_z(input logic [FRAC_W:0] d,
                                              input logic [1:0] z);
    unique case (z)
      2'd0:    return '0;
      2'd1:    return d;
      2'd2:    return d << 1;
      default: return (d << 1) + d;
    endcase
  endfunction

  always_comb begin
    frac = (FRAC_W+1)'(w.beta)
         + times_z((FRAC_W+1)'(w.da), za)
         + times_z((FRAC_W+1)'(w.db), zb)
         + times_z((FRAC_W+1)'(w.dc), zc)
         + times_z((FRAC_W+1)'(w.dd), zd);
    if (frac[FRAC_W]) frac = {1'b0, {FRAC_W{1'b1}}};
    log_q = zero ? '0 : {j, frac[FRAC_W-1:0]};
  end

endmodule
