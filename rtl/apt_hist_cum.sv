// apt_hist_cum: histogram, cumulative histogram (CH) and cumulative
// intensity area (CIA) of one 256x256, 8-bit frame.
//
// Phase 1 (accumulate): after clear, every accepted pixel increments its
// gray-level bin, one pixel per clock, until exactly 2^16 pixels have been
// taken. Phase 2 (cumulate): 256 clocks walk the bins in order and replace
// bin k by the running count c_k = sum_{i<=k} n_i (the CH array holds its
// values in place of the histogram), while the CIA array receives
// s_k = sum_{i<=k} i*n_i. Then ready rises and stays high until the next
// clear. The arrays are organised as 16 blocks of 16 registers: block b,
// register a holds gray level 16*b + a.
//
// Read ports: each of the 16 blocks has its own address (blk_addr[b]) and
// sees ch_rd[b]/cia_rd[b] combinationally. A separate port (top_idx) reads
// the entry at the upper end of the current sub-image, from which the
// sub-image totals are formed (the Reg1/Reg2 of the reference architecture).
// The function of the CH/CIA module follows the reference design; the
// sequencing, in-place cumulation and handshake are this design's choices.
//
// Handshake: pix_ready is high in phase 1; a pixel is taken when pix_valid
// and pix_ready are both high. rst_n is active-low and synchronous.
module apt_hist_cum
  import apt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 pix_valid,
  input  logic [PIX_W-1:0]     pix,
  output logic                 pix_ready,
  output logic                 ready,
  input  logic [BLK_AW-1:0]    blk_addr [NBLK],
  output logic [C_W-1:0]       ch_rd    [NBLK],
  output logic [S_W-1:0]       cia_rd   [NBLK],
  input  logic [PIX_W-1:0]     top_idx,
  output logic [C_W-1:0]       ch_top,
  output logic [S_W-1:0]       cia_top
);

  typedef enum logic [1:0] {H_IDLE, H_ACC, H_CUM, H_READY} hstate_t;
  hstate_t state;

  logic [C_W-1:0]   ch  [LEVELS];   // histogram, then cumulative histogram
  logic [S_W-1:0]   cia [LEVELS];
  logic [N_LOG2-1:0] npix;
  logic [PIX_W-1:0] k;
  logic [C_W-1:0]   c_acc;
  logic [S_W-1:0]   s_acc;
  logic [C_W-1:0]   c_next;
  logic [S_W-1:0]   s_next;

  assign pix_ready = (state == H_ACC);
  assign ready     = (state == H_READY);

  assign c_next = c_acc + ch[k];
  assign s_next = s_acc + S_W'(k) * S_W'(ch[k]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= H_IDLE;
      npix  <= '0;
      k     <= '0;
      c_acc <= '0;
      s_acc <= '0;
      for (int i = 0; i < int'(LEVELS); i++) begin
        ch[i]  <= '0;
        cia[i] <= '0;
      end
    end else if (clear) begin
      state <= H_ACC;
      npix  <= '0;
      for (int i = 0; i < int'(LEVELS); i++) ch[i] <= '0;
    end else begin
      unique case (state)
        H_ACC: if (pix_valid) begin
          ch[pix] <= ch[pix] + 1'b1;
          npix    <= npix + 1'b1;
          if (npix == '1) begin
            state <= H_CUM;
            k     <= '0;
            c_acc <= '0;
            s_acc <= '0;
          end
        end
        H_CUM: begin
          ch[k]  <= c_next;
          cia[k] <= s_next;
          c_acc  <= c_next;
          s_acc  <= s_next;
          k      <= k + 1'b1;
          if (k == PIX_W'(LEVELS - 1)) state <= H_READY;
        end
        default: ;
      endcase
    end
  end

  for (genvar b = 0; b < int'(NBLK); b++) begin : g_rd
    assign ch_rd[b]  = ch [PIX_W'(b * BLK_DEPTH) + PIX_W'(blk_addr[b])];
    assign cia_rd[b] = cia[PIX_W'(b * BLK_DEPTH) + PIX_W'(blk_addr[b])];
  end

  assign ch_top  = ch[top_idx];
  assign cia_top = cia[top_idx];

endmodule
