// apt_final_thresh_tb: self-checking testbench of the final threshold unit.
//
// Drives random block maxima (random validity, scores with deliberate ties)
// and random sub-image totals and alpha, pulses eval and checks, one clock
// later, the winning threshold (largest score, lowest block on a tie), the
// CLF stop decision and log2(sigma_B^2) against values computed here with
// the reference logarithm. Scores are placed near the limit so that both
// outcomes of the stop rule occur; alpha = 0 must never stop.
module apt_final_thresh_tb;
  import apt_pkg::*;
  import apt_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic eval = 0;
  logic blk_valid [NBLK];
  score_t blk_score [NBLK];
  logic [PIX_W-1:0] blk_t [NBLK];
  logic [W_W-1:0] w_tot = '0;
  logic [U_W-1:0] u_tot = '0;
  logic [ALPHA_W-1:0] alpha = '0;
  logic cfg_we = 0;
  logic [LUT_AW-1:0] cfg_addr = '0;
  lut_word_t cfg_wdata = '0;
  logic res_valid, best_valid, stop;
  logic [PIX_W-1:0] best_t;
  score_t log_sb2;
  table_t tref;

  apt_final_thresh dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_stop = 0, n_go = 0;

  initial begin
    tref = default_table();
    for (int b = 0; b < 16; b++) begin blk_valid[b] = 0; blk_score[b] = '0; blk_t[b] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      longint wt, ut, lim, best, exp_lsb, ctr;
      int bt, al;
      bit v, exp_stop;
      wt = $urandom_range(1024, 1);
      ut = wt * $urandom_range(255, 1);
      al = (n % 10 == 0) ? 0 : $urandom_range(1023, 1);
      lim = (al != 0) ? lcu_ref(al * ut, tref) + lcu_ref(wt, tref) - 4 * 4096 : 0;
      v = 0; best = 0; bt = 0;
      ctr = lim + $urandom_range(8000) - 6000;
      for (int b = 0; b < 16; b++) begin
        blk_valid[b] = ($urandom_range(3) != 0);
        blk_score[b] = score_t'(ctr + $urandom_range(2000) - 1000);
        if ($urandom_range(3) == 0 && b > 0) blk_score[b] = blk_score[b - 1];
        blk_t[b] = 8'(b * 16 + $urandom_range(15));
        if (blk_valid[b] && (!v || longint'(blk_score[b]) > best)) begin
          v = 1; best = longint'(blk_score[b]); bt = int'(blk_t[b]);
        end
      end
      exp_stop = v && al != 0 && best <= lim;
      exp_lsb = best - 2 * lcu_ref(wt, tref);
      w_tot = W_W'(wt); u_tot = U_W'(ut); alpha = ALPHA_W'(al);
      @(negedge clk);
      eval = 1;
      @(negedge clk);
      eval = 0;
      checks++;
      if (!res_valid || best_valid != v || (v && (best_t != 8'(bt) || stop != exp_stop
          || longint'(log_sb2) != exp_lsb))) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d got v=%0d t=%0d stop=%0d lsb=%0d exp v=%0d t=%0d stop=%0d lsb=%0d",
                   n, best_valid, best_t, stop, log_sb2, v, bt, exp_stop, exp_lsb);
      end
      if (v && exp_stop) n_stop++;
      if (v && !exp_stop) n_go++;
    end
    checks++;
    if (n_stop == 0 || n_go == 0) begin failures++; $display("FAIL stop rule not exercised both ways"); end
    $display("stop=%0d continue=%0d", n_stop, n_go);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
