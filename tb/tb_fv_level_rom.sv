`timescale 1ps/1fs
// tb_fv_level_rom: checks every level of the operating-point table. Frequencies are checked
// against the closed form 10000 - 236*level MHz, voltages against the published list, and
// the package ratio tables against real-number arithmetic.
module tb_fv_level_rom;
  import fv_pkg::*;
  int checks = 0, failures = 0;
  level_t level;
  mhz_t   mhz;
  mv_t    mv;
  int     exp_mv [21] = '{1100, 1057, 1016, 976, 938, 901, 866, 832, 800, 769, 739,
                          711, 683, 657, 632, 608, 584, 562, 541, 521, 501};

  fv_level_rom dut (.level(level), .mhz(mhz), .mv(mv));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 21; l++) begin
      level = level_t'(l);
      #10;
      check(int'(mhz) == 10000 - 236 * l, $sformatf("level %0d MHz %0d", l, mhz));
      check(int'(mv) == exp_mv[l], $sformatf("level %0d mV %0d", l, mv));
    end
    for (int l = 21; l < 32; l++) begin
      level = level_t'(l);
      #10;
      check(mhz == 14'd5280 && mv == 11'd501, $sformatf("out-of-range level %0d", l));
    end
    for (int n = 0; n < 21; n += 4)
      for (int l = 0; l < 21; l += 3) begin
        real fr, vr;
        fr = (10000.0 - 236.0 * n) / (10000.0 - 236.0 * l) * 65536.0;
        vr = (real'(exp_mv[l]) * exp_mv[l]) / (real'(exp_mv[n]) * exp_mv[n]) * 65536.0;
        check((real'(FREQ_RATIO[n][l]) - fr) < 1.0 && (fr - real'(FREQ_RATIO[n][l])) < 1.0,
              $sformatf("freq ratio %0d/%0d", n, l));
        check((real'(VSQ_RATIO[l][n]) - vr) < 1.0 && (vr - real'(VSQ_RATIO[l][n])) < 1.0,
              $sformatf("vsq ratio %0d/%0d", l, n));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
