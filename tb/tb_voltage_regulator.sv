`timescale 1ps/1fs
// tb_voltage_regulator: ramps from level 0 to 20 (must take 1 us), back by one level
// (50 ns) and by five (250 ns), and checks the settled voltage, the monotonic ramp and the
// four-phase acknowledge.
module tb_voltage_regulator;
  import fv_pkg::*;
  int checks = 0, failures = 0;
  logic vreq = 0, vack;
  level_t level = '0, cur_level;
  mv_t vdd_mv;

  voltage_regulator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic move(level_t to, time exp_ps, int exp_mv);
    time t0;
    mv_t last;
    int  up;
    up = (to > cur_level) ? 0 : 1;
    #1000;
    level = to;
    #10 vreq = 1;
    t0 = $time;
    last = vdd_mv;
    while (!vack) begin
      #1000;
      if (up == 1) check(vdd_mv >= last, $sformatf("ramp rises monotonically %0d -> %0d at %0t", last, vdd_mv, $time));
      else         check(vdd_mv <= last, $sformatf("ramp falls monotonically %0d -> %0d at %0t", last, vdd_mv, $time));
      last = vdd_mv;
    end
    check($time - t0 >= exp_ps && $time - t0 <= exp_ps + 1000,
          $sformatf("to level %0d took %0t ps, expected %0t", to, $time - t0, exp_ps));
    check(int'(vdd_mv) == exp_mv && cur_level == to, $sformatf("settled at %0d mV, level %0d, expected %0d mV", vdd_mv, cur_level, exp_mv));
    vreq = 0;
    #10 check(!vack, "acknowledge released");
  endtask

  initial begin
    #100;
    check(int'(vdd_mv) == 1100 && !vack, "starts at level 0");
    move(20, 1_000_000, 501);
    move(19, 50_000, 521);
    move(14, 250_000, 632);
    move(0, 700_000, 1100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
