// apt_hist_cum_tb: self-checking testbench of the histogram and CH/CIA unit.
//
// Streams two random 256x256 frames (different gray-level distributions,
// with random gaps in pix_valid), then reads every entry through the 16
// block read ports and through the top-index port and compares them with
// cumulative sums computed here. Also checks that pix_ready drops after
// exactly 65536 pixels and that ready rises 256 clocks later.
module apt_hist_cum_tb;
  import apt_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic clear = 0, pix_valid = 0, pix_ready, ready;
  logic [PIX_W-1:0]  pix = '0;
  logic [BLK_AW-1:0] blk_addr [NBLK];
  logic [C_W-1:0]    ch_rd    [NBLK];
  logic [S_W-1:0]    cia_rd   [NBLK];
  logic [PIX_W-1:0]  top_idx = '0;
  logic [C_W-1:0]    ch_top;
  logic [S_W-1:0]    cia_top;

  apt_hist_cum dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [256];

  task automatic run_frame(input int mode);
    int sent, cyc;
    longint c, s;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    sent = 0;
    while (sent < 65536) begin
      int p;
      if (mode == 0) p = $urandom_range(255);
      else           p = ($urandom_range(99) < 70) ? $urandom_range(40, 20) : $urandom_range(200, 150);
      pix_valid = ($urandom_range(9) != 0);
      pix = 8'(p);
      checks++;
      if (!pix_ready) begin failures++; $display("FAIL pix_ready low after %0d pixels", sent); end
      @(posedge clk);
      if (pix_valid) begin hist[p]++; sent++; end
      @(negedge clk);
    end
    pix_valid = 0;
    checks++;
    if (pix_ready) begin failures++; $display("FAIL pix_ready still high after 65536 pixels"); end
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 256) begin failures++; $display("FAIL cumulation took %0d clocks, expected 256", cyc); end
    c = 0; s = 0;
    for (int t = 0; t < 256; t++) begin
      c += hist[t]; s += t * hist[t];
      blk_addr[t / 16] = 4'(t % 16);
      top_idx = 8'(t);
      #1;
      checks += 2;
      if (ch_rd[t / 16] != C_W'(c) || cia_rd[t / 16] != S_W'(s)) begin
        failures++;
        $display("FAIL block port t=%0d ch=%0d/%0d cia=%0d/%0d", t, ch_rd[t/16], c, cia_rd[t/16], s);
      end
      if (ch_top != C_W'(c) || cia_top != S_W'(s)) begin
        failures++;
        $display("FAIL top port t=%0d", t);
      end
    end
  endtask

  initial begin
    for (int b = 0; b < 16; b++) blk_addr[b] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
