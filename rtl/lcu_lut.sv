// lcu_lut: the reconfigurable look-up table of a logarithm conversion unit.
//
// Sixteen 28-bit words, one per value of the four bits that follow the
// leading one of the operand. Each word packs the fractional logarithm beta
// and the four slope multiplicands D_A..D_D (see apt_pkg). 16 x 28 = 448 bits
// per table. The contents can be rewritten at run time, which is how the
// precision of the conversion is traded against the application's needs; on
// reset the table holds the default contents of apt_pkg::LUT_DEFAULT.
//
// Interface: cfg_we/cfg_addr/cfg_wdata write one word on the rising clock
// edge; lut presents all 16 words continuously to the LCUs that share the
// table. Timing: a write is visible from the cycle after it. rst_n is
// active-low and synchronous.
module lcu_lut
  import apt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_we,
  input  logic [LUT_AW-1:0]   cfg_addr,
  input  lut_word_t           cfg_wdata,
  output lut_word_t           lut [LUT_N]
);

  lut_word_t mem [LUT_N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(LUT_N); k++) mem[k] <= LUT_DEFAULT[k];
    end else if (cfg_we) begin
      mem[cfg_addr] <= cfg_wdata;
    end
  end

  assign lut = mem;

endmodule
