// lcu_tb: self-checking testbench of the logarithm conversion unit.
//
// A 16-bit LCU is checked exhaustively (every non-zero operand) against the
// integer reference model and against the true log2 (worst-case error must
// stay below 0.0014). A 29-bit LCU is checked on random operands the same
// way. The table fed to both is computed by the testbench from its formula
// and also compared with the RTL package default. Zero must raise zero.
module lcu_tb;
  import apt_pkg::*;
  import apt_tb_pkg::*;

  int checks = 0, failures = 0;

  lut_word_t  lut [LUT_N];
  table_t     tref;

  logic [15:0] q16;
  logic [15:0] l16;
  logic        z16;
  logic [28:0] q29;
  logic [16:0] l29;
  logic        z29;

  lcu #(.IN_W(16)) dut16 (.q(q16), .lut, .log_q(l16), .zero(z16));
  lcu #(.IN_W(29)) dut29 (.q(q29), .lut, .log_q(l29), .zero(z29));

  real maxerr16 = 0.0, maxerr29 = 0.0;

  task automatic check_one16(input int v);
    real err;
    q16 = 16'(v);
    #1;
    checks++;
    if (longint'(l16) != lcu_ref(longint'(v), tref) || z16) begin
      failures++;
      if (failures < 10) $display("FAIL lcu16 q=%0d got=%0d exp=%0d", v, l16, lcu_ref(longint'(v), tref));
    end
    err = l16 / 4096.0 - log2r(real'(v));
    if (err < 0) err = -err;
    if (err > maxerr16) maxerr16 = err;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tref = default_table();
    for (int k = 0; k < 16; k++) begin
      lut[k] = lut_word_t'(tref[k]);
      checks++;
      if (tref[k] != word_t'(LUT_DEFAULT[k])) begin
        failures++;
        $display("FAIL default table word %0d: pkg=%h ref=%h", k, LUT_DEFAULT[k], tref[k]);
      end
    end

    q16 = 0; q29 = 0;
    #1;
    checks++;
    if (!z16 || !z29) begin failures++; $display("FAIL zero flag"); end

    for (int v = 1; v < 65536; v++) check_one16(v);
    checks++;
    if (maxerr16 > 0.0014) begin failures++; $display("FAIL 16-bit max error %f", maxerr16); end

    for (int n = 0; n < 20000; n++) begin
      longint unsigned v;
      real err;
      v = longint'($urandom) & ((64'd1 << ($urandom_range(28, 1) + 1)) - 1);
      if (v == 0) v = 1;
      q29 = 29'(v);
      #1;
      checks++;
      if (longint'(l29) != lcu_ref(v, tref) || z29) begin
        failures++;
        if (failures < 10) $display("FAIL lcu29 q=%0d got=%0d exp=%0d", v, l29, lcu_ref(v, tref));
      end
      err = l29 / 4096.0 - log2r(real'(v));
      if (err < 0) err = -err;
      if (err > maxerr29) maxerr29 = err;
    end
    checks++;
    if (maxerr29 > 0.0015) begin failures++; $display("FAIL 29-bit max error %f", maxerr29); end

    $display("max |error| 16-bit: %f  29-bit: %f", maxerr16, maxerr29);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
