// lcu_lut_tb: self-checking testbench of the reconfigurable LCU table.
//
// Checks that reset loads the default contents (computed here from their
// formula), that a write changes exactly the addressed word from the next
// clock, that other words keep their value, and that reset restores the
// defaults.
module lcu_lut_tb;
  import apt_pkg::*;
  import apt_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [LUT_AW-1:0] cfg_addr = '0;
  lut_word_t cfg_wdata = '0;
  lut_word_t lut [LUT_N];
  table_t tref, expv;

  lcu_lut dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .lut);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (word_t'(lut[k]) != expv[k]) begin
        failures++;
        $display("FAIL %s word %0d: got %h exp %h", what, k, lut[k], expv[k]);
      end
    end
  endtask

  initial begin
    tref = default_table();
    expv = tref;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    compare("after reset");
    for (int n = 0; n < 40; n++) begin
      int a;
      word_t d;
      a = $urandom_range(15);
      d = word_t'($urandom);
      @(negedge clk);
      cfg_we = 1; cfg_addr = 4'(a); cfg_wdata = lut_word_t'(d);
      #1;
      checks++;
      if (word_t'(lut[a]) != expv[a]) begin failures++; $display("FAIL write visible too early"); end
      @(negedge clk);
      cfg_we = 0;
      expv[a] = d;
      compare("after write");
    end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    expv = tref;
    compare("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
