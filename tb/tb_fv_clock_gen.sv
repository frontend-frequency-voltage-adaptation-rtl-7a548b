`timescale 1ps/1fs
// tb_fv_clock_gen: measures the clock period at several levels (1e6/MHz ps, from the
// closed form 10000 - 236*level MHz), checks that a level change never produces a short or
// partial period, and that `enable` stops the clock.
module tb_fv_clock_gen;
  import fv_pkg::*;
  int checks = 0, failures = 0;
  logic enable = 0, clk;
  level_t freq_level = '0;
  mhz_t cur_mhz;

  fv_clock_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime last_rise = 0, min_period = 1.0e9;
  always @(posedge clk) begin
    if (last_rise > 0 && $realtime - last_rise < min_period) min_period = $realtime - last_rise;
    last_rise = $realtime;
  end

  initial begin
    realtime t0, per, exp;
    #500;
    check(clk == 0, "no clock while disabled");
    enable = 1;
    for (int l = 0; l < 21; l += 4) begin
      freq_level = level_t'(l);
      repeat (3) @(posedge clk);
      t0 = $realtime;
      repeat (10) @(posedge clk);
      per = ($realtime - t0) / 10.0;
      exp = 1.0e6 / (10000.0 - 236.0 * l);
      check(per - exp < 0.01 && exp - per < 0.01, $sformatf("level %0d period %f ps exp %f", l, per, exp));
      check(int'(cur_mhz) == 10000 - 236 * l, "reported frequency");
    end
    // no period shorter than the fastest one, across all the changes above
    check(min_period > 99.99, $sformatf("shortest period %f ps", min_period));
    enable = 0;
    #1000;
    t0 = last_rise;
    #1000;
    check(last_rise == t0 && clk == 0, "clock stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
