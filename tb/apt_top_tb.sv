// apt_top_tb: end-to-end, full-size testbench of the APT engine.
//
// The engine is used with its default parameters. Several synthetic
// 256x256 frames are streamed through the pixel port (some with random gaps
// in pix_valid): an endoscope-like frame (small dark lumen, mid-gray tissue,
// bright highlights) at alpha = 9.8, a bimodal frame with a large alpha, the
// same frames with alpha = 0 (the CLF rule never stops them), a frame with
// three gray levels only, and a frame run after the logarithm tables have
// been rewritten with a coarse table and then restored. For every frame the
// threshold, the number of iterations, the stop reason and log2(sigma_B^2)
// are compared with the reference model, and the clocks from the last pixel
// to done with 257 + 24 per evaluation. The threshold of the first
// iteration is also checked, for the default table, against an exact
// floating-point Otsu search (its between-class variance must be within 2%
// of the true maximum).
// Mechanisms counted (each must occur): recursion over several iterations,
// stop by the CLF rule, stop on an exhausted sub-image, skipped candidates,
// pixel-stream stalls and table reconfiguration.
module apt_top_tb;
  import apt_pkg::*;
  import apt_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, pix_valid = 0, pix_ready;
  logic [PIX_W-1:0] pix = '0;
  logic [ALPHA_W-1:0] alpha = '0;
  logic lut_we = 0;
  logic [LUT_AW-1:0] lut_addr = '0;
  lut_word_t lut_wdata = '0;
  logic busy, done, found;
  logic [PIX_W-1:0] thresh;
  logic [4:0] iterations;
  stop_t reason;
  score_t log_sb2;

  apt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  table_t tcur;
  longint hist [256];
  int n_multi = 0, n_clf = 0, n_empty = 0, n_skip = 0, n_stall = 0, n_reconf = 0;

  function automatic int draw(input int mode);
    int r, m, sp, p;
    r = $urandom_range(99);
    case (mode)
      0: begin  // endoscope-like
        if (r < 12)      begin m = 25;  sp = 12; end
        else if (r < 80) begin m = 120; sp = 45; end
        else             begin m = 200; sp = 30; end
      end
      1: begin  // bimodal
        if (r < 50) begin m = 60; sp = 25; end
        else        begin m = 180; sp = 25; end
      end
      default: begin  // three levels only
        return (r < 30) ? 0 : (r < 80) ? 90 : 200;
      end
    endcase
    p = m + $urandom_range(sp) - $urandom_range(sp);
    if (p < 0) p = 0;
    if (p > 255) p = 255;
    return p;
  endfunction

  // exact Otsu between-class variance on the whole frame
  function automatic real sb2_exact(input int t);
    real n, w, mt, mu;
    n = 0; mt = 0; w = 0; mu = 0;
    for (int i = 0; i < 256; i++) begin
      n += hist[i]; mt += i * hist[i];
      if (i <= t) begin w += hist[i]; mu += i * hist[i]; end
    end
    w /= n; mu /= n; mt /= n;
    if (w <= 0.0 || w >= 1.0) return 0.0;
    return (w * mt - mu) * (w * mt - mu) / (w * (1.0 - w));
  endfunction

  task automatic frame(input string name, input int mode, input int al, input bit gaps);
    apt_result_t r;
    int sent, cyc, evals;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    alpha = ALPHA_W'(al);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    sent = 0;
    while (sent < 65536) begin
      int p;
      p = draw(mode);
      pix = 8'(p);
      pix_valid = !gaps || ($urandom_range(7) != 0);
      if (!pix_valid) n_stall++;
      @(posedge clk);
      if (pix_valid && pix_ready) begin hist[p]++; sent++; end
      @(negedge clk);
    end
    pix_valid = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end

    r = apt_ref(hist, al, 16, tcur);
    evals = r.iterations + ((r.reason == 2) ? 1 : 0);
    checks++;
    if (int'(thresh) != r.thresh || found != r.found || int'(iterations) != r.iterations
        || int'(reason) != r.reason || (r.found && longint'(log_sb2) != r.log_sb2)) begin
      failures++;
      $display("FAIL %s: got thr=%0d found=%0d it=%0d reason=%0d lsb=%0d; exp thr=%0d found=%0d it=%0d reason=%0d lsb=%0d",
               name, thresh, found, iterations, reason, log_sb2,
               r.thresh, r.found, r.iterations, r.reason, r.log_sb2);
    end
    checks++;
    if (cyc != 257 + 24 * evals) begin
      failures++;
      $display("FAIL %s: %0d clocks from last pixel to done, expected %0d", name, cyc, 257 + 24 * evals);
    end
    // first iteration against exact Otsu
    begin
      real best, got;
      int bt1, sk;
      longint c[256], s[256], ca, sa, bs;
      ca = 0; sa = 0;
      for (int i = 0; i < 256; i++) begin ca += hist[i]; sa += i * hist[i]; c[i] = ca; s[i] = sa; end
      if (tcur == default_table() && best_split(c, s, 255, tcur, bt1, bs, sk)) begin
        best = 0;
        for (int t = 0; t < 255; t++) if (sb2_exact(t) > best) best = sb2_exact(t);
        got = sb2_exact(bt1);
        checks++;
        if (got < 0.98 * best) begin
          failures++;
          $display("FAIL %s: first split t=%0d has sigma_B^2 %f, exact maximum %f", name, bt1, got, best);
        end
      end
    end
    $display("%s: alpha=%0d threshold=%0d iterations=%0d reason=%0d log2(sigma_B^2)=%f clocks=%0d",
             name, al, thresh, iterations, reason, real'(log_sb2) / 4096.0, cyc);
    if (r.iterations > 1) n_multi++;
    if (r.reason == 1) n_clf++;
    if (r.reason == 2) n_empty++;
    n_skip += r.skipped;
  endtask

  task automatic write_table(input table_t t);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = 4'(k); lut_wdata = lut_word_t'(t[k]);
    end
    @(negedge clk);
    lut_we = 0;
    tcur = t;
    n_reconf++;
  endtask

  initial begin
    table_t coarse;
    tcur = default_table();
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame("endoscope", 0, 157, 0);
    frame("bimodal", 1, 1023, 1);
    frame("endoscope-noclf", 0, 0, 0);
    frame("bimodal-noclf", 1, 0, 0);
    frame("three-level", 2, 157, 1);
    // coarse table: beta only at 2 address bits' resolution, no slope words
    for (int k = 0; k < 16; k++) coarse[k] = {tcur[k & 12][27:16], 16'h0};
    write_table(coarse);
    frame("endoscope-coarse", 0, 157, 0);
    write_table(default_table());
    frame("endoscope-restored", 0, 100, 1);

    checks += 6;
    if (n_multi == 0)  begin failures++; $display("FAIL no multi-iteration run"); end
    if (n_clf == 0)    begin failures++; $display("FAIL CLF stop never happened"); end
    if (n_empty == 0)  begin failures++; $display("FAIL exhausted-range stop never happened"); end
    if (n_skip == 0)   begin failures++; $display("FAIL no candidate skipped"); end
    if (n_stall == 0)  begin failures++; $display("FAIL no pixel stall"); end
    if (n_reconf == 0) begin failures++; $display("FAIL no table reconfiguration"); end
    $display("mechanisms: multi-iteration=%0d clf-stop=%0d empty-stop=%0d skipped=%0d stalls=%0d reconfig=%0d",
             n_multi, n_clf, n_empty, n_skip, n_stall, n_reconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
