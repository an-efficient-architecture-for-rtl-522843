// apt_ctrl_tb: self-checking testbench of the APT sequencer.
//
// The histogram unit, the 16 blocks and the final threshold unit are
// replaced by small reactive stand-ins: ready rises a random time after
// clear, the blocks report done as the real ones do, 20 clocks after the start edge, and each evaluation
// returns a scripted result. Scenarios: stop by the CLF rule after three
// iterations, an exhausted sub-image in the second iteration, an exhausted
// range in the first (nothing found), and the iteration limit (set to 5
// here). Checked: the upper bound and normalised totals used by every
// iteration, the spacing of 24 clocks between iterations, and the result
// outputs, busy and done.
module apt_ctrl_tb;
  import apt_pkg::*;

  localparam int MAXIT = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic hist_clear, hist_ready = 0;
  logic [PIX_W-1:0] top_idx;
  logic [C_W-1:0] ch_top;
  logic [S_W-1:0] cia_top;
  logic blk_start;
  logic [PIX_W-1:0] t_upper;
  logic [W_W-1:0] w_tot;
  logic [U_W-1:0] u_tot;
  logic [NBLK-1:0] blk_done = '0;
  logic eval, res_valid = 0, best_valid = 0, stop = 0;
  logic [PIX_W-1:0] best_t = '0;
  score_t res_log_sb2 = '0;
  logic [PIX_W-1:0] thresh;
  logic found;
  logic [4:0] iterations;
  stop_t reason;
  score_t log_sb2;

  apt_ctrl #(.MAX_ITER(MAXIT)) dut (.*);

  always #5 clk = ~clk;

  longint c [256], s [256];
  assign ch_top  = C_W'(c[top_idx]);
  assign cia_top = S_W'(s[top_idx]);

  // scripted evaluation results
  int     sc_valid [8];
  int     sc_t     [8];
  int     sc_stop  [8];
  int     it_idx;
  int     exp_T;
  int     last_start;
  int     cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // histogram stand-in
  initial forever begin
    @(posedge clk);
    if (hist_clear) begin
      hist_ready <= 0;
      repeat ($urandom_range(200, 20)) @(posedge clk);
      hist_ready <= 1;
    end
  end

  // block stand-in, with checks of what each iteration uses
  initial forever begin
    @(posedge clk);
    if (blk_start) begin
      checks++;
      if (int'(t_upper) != exp_T || longint'(w_tot) != (c[exp_T] >> 6)
          || longint'(u_tot) != (s[exp_T] >> 6)) begin
        failures++;
        $display("FAIL iteration %0d: T=%0d (exp %0d) W_T=%0d U_T=%0d", it_idx, t_upper, exp_T, w_tot, u_tot);
      end
      if (it_idx > 0) begin
        checks++;
        if (cycle - last_start != 24) begin failures++; $display("FAIL iteration spacing %0d", cycle - last_start); end
      end
      last_start = cycle;
      blk_done <= '0;
      repeat (20) @(posedge clk);
      blk_done <= '1;
    end
  end

  // final-threshold stand-in
  initial forever begin
    @(posedge clk);
    res_valid <= eval;
    if (eval) begin
      best_valid  <= sc_valid[it_idx] != 0;
      best_t      <= 8'(sc_t[it_idx]);
      stop        <= sc_stop[it_idx] != 0;
      res_log_sb2 <= score_t'(1000 + it_idx);
      if (sc_valid[it_idx] != 0) exp_T = sc_t[it_idx];
      it_idx++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scenario(input string name, input int n, input int exp_thr, input bit exp_found,
                          input int exp_it, input stop_t exp_reason);
    longint ca = 0, sa = 0;
    for (int i = 0; i < 256; i++) begin
      longint h = $urandom_range(500);
      ca += h; sa += i * h; c[i] = ca; s[i] = sa;
    end
    it_idx = 0;
    exp_T = 255;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy || done) begin failures++; $display("FAIL %s: busy/done after start", name); end
    while (!done) @(negedge clk);
    checks += 2;
    if (busy) begin failures++; $display("FAIL %s: busy with done", name); end
    if (thresh != 8'(exp_thr) || found != exp_found || int'(iterations) != exp_it
        || reason != exp_reason || it_idx != n
        || (exp_found && log_sb2 != score_t'(1000 + exp_it - 1))) begin
      failures++;
      $display("FAIL %s: thr=%0d found=%0d it=%0d reason=%0d evals=%0d", name, thresh, found,
               iterations, reason, it_idx);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL %s: done did not hold", name); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    sc_valid = '{1, 1, 1, 0, 0, 0, 0, 0}; sc_t = '{120, 60, 33, 0, 0, 0, 0, 0}; sc_stop = '{0, 0, 1, 0, 0, 0, 0, 0};
    scenario("clf", 3, 33, 1, 3, STOP_CLF);
    sc_valid = '{1, 0, 0, 0, 0, 0, 0, 0}; sc_t = '{90, 0, 0, 0, 0, 0, 0, 0}; sc_stop = '{0, 0, 0, 0, 0, 0, 0, 0};
    scenario("empty2", 2, 90, 1, 1, STOP_EMPTY);
    sc_valid = '{0, 0, 0, 0, 0, 0, 0, 0};
    scenario("empty1", 1, 0, 0, 0, STOP_EMPTY);
    sc_valid = '{1, 1, 1, 1, 1, 1, 1, 1}; sc_t = '{200, 150, 100, 70, 40, 20, 10, 5}; sc_stop = '{0, 0, 0, 0, 0, 0, 0, 0};
    scenario("maxit", MAXIT, 40, 1, MAXIT, STOP_MAXIT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
