`timescale 1ps/1fs
// tb_fv_stepper: the testbench plays the voltage regulator (acknowledging after 40 cycles
// per level moved, on its own timing). It asks for level 7, then level 2, then 20, then 0,
// changing the target once in the middle of a walk, and checks: every voltage request moves
// by exactly one level; on the way up the voltage leads the frequency, on the way down the
// frequency leads; the number of up and down steps; the final levels; and that each step
// waits for the regulator.
module tb_fv_stepper;
  import fv_pkg::*;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_vreq = 0;

  logic clk = 0, rst_n = 0;
  level_t target_level = '0, freq_level, volt_level;
  logic vreq, vack = 0, changing, step_up_pulse, step_down_pulse;
  level_t reg_level = '0;

  always #50 clk = ~clk;

  fv_stepper dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // regulator stand-in
  always begin
    int d;
    @(posedge vreq);
    n_vreq++;
    d = (volt_level > reg_level) ? int'(volt_level - reg_level) : int'(reg_level - volt_level);
    check(d == 1, $sformatf("voltage request moves %0d levels", d));
    if (volt_level < reg_level)
      check(freq_level == reg_level, "speeding up: frequency waits for the voltage");
    else
      check(freq_level == volt_level, "slowing down: frequency already lowered");
    #(4000 * d);
    reg_level = volt_level;
    vack = 1;
    @(negedge vreq);
    #(300);
    vack = 0;
  end

  always @(posedge clk) begin
    if (rst_n && step_up_pulse) n_up++;
    if (rst_n && step_down_pulse) n_down++;
    if (rst_n) check(freq_level >= reg_level, "clock never faster than the settled supply");
  end

  task automatic walk_to(level_t t);
    @(negedge clk) target_level = t;
    @(negedge clk);
    while (changing || freq_level != t) @(negedge clk);
    @(negedge clk);   // let the last step's pulse be counted
    check(freq_level == t && volt_level == t && reg_level == t,
          $sformatf("settled at %0d/%0d, target %0d", freq_level, volt_level, t));
  endtask

  initial begin
    time t0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk);
    check(freq_level == 0 && volt_level == 0 && !changing, "reset state");
    t0 = $time;
    walk_to(7);
    check(n_down == 7 && n_up == 0, $sformatf("down steps %0d", n_down));
    check($time - t0 >= 7 * 4000, "each step waits for the regulator");
    walk_to(2);
    check(n_up == 5, $sformatf("up steps %0d", n_up));
    // retarget in the middle of a walk
    @(negedge clk) target_level = 20;
    while (freq_level < 9) @(negedge clk);
    walk_to(4);
    walk_to(20);
    walk_to(0);
    check(n_vreq == n_up + n_down, "one regulator request per step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
