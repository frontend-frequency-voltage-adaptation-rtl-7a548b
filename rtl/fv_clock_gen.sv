`timescale 1fs/1fs
// fv_clock_gen: behavioural model of a clock domain's frequency controller.
//
// This is a simulation model, not synthesizable logic: in silicon this is a PLL or DLL with
// a glitch-free output divider. It produces `clk` at the frequency of the level on
// `freq_level` (fv_pkg, 10 GHz at level 0 down to 5.28 GHz at level 20). The level is sampled
// once per period, at the falling edge, so every period is whole, no clock is stopped and no
// short pulse is produced: the first period after a change is entirely at the new frequency
// or entirely at the old one. Time unit of this file: 1 fs, so periods are exact to 1 fs. `clk` stays low while `enable` is low. The level
// frequencies are the published ones; the switching behaviour is a choice of this model.
module fv_clock_gen
  import fv_pkg::*;
(
  input  logic   enable,
  input  level_t freq_level,
  output logic   clk,
  output mhz_t   cur_mhz
);
  level_t lv;
  longint half_fs;   // half period in femtoseconds (this file's time unit)

  initial begin
    clk     = 1'b0;
    cur_mhz = mhz_t'(LEVEL_MHZ[0]);
  end

  // The level is sampled half a period before each rising edge and sets the length of the
  // low phase before it and the high phase after it.
  always begin
    if (!enable) begin
      clk = 1'b0;
      wait (enable);
    end
    lv      = (freq_level > LEVEL_SLOWEST) ? LEVEL_SLOWEST : freq_level;
    half_fs = 500_000_000 / longint'(LEVEL_MHZ[lv]);
    cur_mhz = mhz_t'(LEVEL_MHZ[lv]);
    #(half_fs);
    clk     = 1'b1;
    #(half_fs);
    clk     = 1'b0;
  end
endmodule
