// bcv_block_tb: self-checking testbench of one between-class-variance block.
//
// The block under test is block 5 (thresholds 80..95). The testbench holds
// the cumulative arrays of random histograms and answers the block's reads.
// For each trial it picks an upper bound T (whole range, inside the block's
// range, or below it so no candidate is valid), pulses start and compares
// the block maximum and its threshold with the reference model, and checks
// that done rises 21 clocks after start is sampled.
module bcv_block_tb;
  import apt_pkg::*;
  import apt_tb_pkg::*;

  localparam int BLKI = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [PIX_W-1:0]  t_upper = '0;
  logic [W_W-1:0]    w_tot = '0;
  logic [U_W-1:0]    u_tot = '0;
  logic [BLK_AW-1:0] rd_addr;
  logic [C_W-1:0]    ch_rd;
  logic [S_W-1:0]    cia_rd;
  logic              done, max_valid;
  score_t            max_score;
  logic [PIX_W-1:0]  max_t;
  logic              cfg_we = 0;
  logic [LUT_AW-1:0] cfg_addr = '0;
  lut_word_t         cfg_wdata = '0;

  longint c [256], s [256];
  table_t tref;

  bcv_block #(.BLK(BLKI)) dut (.*);

  assign ch_rd  = C_W'(c[BLKI * 16 + int'(rd_addr)]);
  assign cia_rd = S_W'(s[BLKI * 16 + int'(rd_addr)]);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_hist(input int mode);
    longint ca = 0, sa = 0, h;
    int left = 65536;
    for (int i = 0; i < 256; i++) begin
      if (i == 255) h = left;
      else if (mode == 0) h = (left > 0) ? $urandom_range(511) : 0;
      else h = (i >= 70 && i < 100 && left > 0) ? $urandom_range(1500) : $urandom_range(3) * 30;
      if (h > left) h = left;
      left -= int'(h);
      ca += h; sa += i * h;
      c[i] = ca; s[i] = sa;
    end
  endtask

  task automatic trial(input int T);
    longint wt, ut, w, u, pa, pb, d, e, sc, best;
    int bt, cyc;
    bit found;
    wt = c[T] >> 6; ut = s[T] >> 6;
    found = 0; best = 0; bt = 0;
    for (int t = BLKI * 16; t < BLKI * 16 + 16 && t < T; t++) begin
      w = c[t] >> 6; u = s[t] >> 6;
      pa = w * ut; pb = u * wt;
      d = (pa >= pb) ? pa - pb : pb - pa;
      e = wt - w;
      if (w == 0 || e == 0 || d == 0) continue;
      sc = 2 * lcu_ref(d, tref) - lcu_ref(w, tref) - lcu_ref(e, tref);
      if (!found || sc > best) begin found = 1; best = sc; bt = t; end
    end
    @(negedge clk);
    t_upper = 8'(T); w_tot = W_W'(wt); u_tot = U_W'(ut);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 21) begin failures++; $display("FAIL done after %0d clocks", cyc); end
    checks++;
    if (max_valid != found || (found && (max_t != 8'(bt) || longint'(max_score) != best))) begin
      failures++;
      $display("FAIL T=%0d got v=%0d t=%0d sc=%0d exp v=%0d t=%0d sc=%0d",
               T, max_valid, max_t, max_score, found, bt, best);
    end
  endtask

  int nvalid = 0;
  initial begin
    tref = default_table();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      make_hist(n % 2);
      trial(255);
      trial($urandom_range(95, 81));
      trial($urandom_range(80, 1));
      if (max_valid) begin failures++; $display("FAIL candidate reported with T below block"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
