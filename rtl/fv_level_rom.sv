`timescale 1ps/1fs
// fv_level_rom: operating point of a frequency-voltage level.
//
// A 21-entry read-only table that returns the clock frequency (MHz) and the supply voltage
// (mV) of a level, level 0 being the fastest and highest-voltage point. It is combinational:
// the outputs follow `level` in the same cycle. Levels above 20 return the slowest point.
// The table contents are the published operating points (see fv_pkg).
module fv_level_rom
  import fv_pkg::*;
(
  input  level_t level,
  output mhz_t   mhz,
  output mv_t    mv
);
  always_comb begin
    mhz = mhz_t'(LEVEL_MHZ[NUM_LEVELS-1]);
    mv  = mv_t'(LEVEL_MV[NUM_LEVELS-1]);
    for (int i = 0; i < NUM_LEVELS; i++) begin
      if (level == level_t'(i)) begin
        mhz = mhz_t'(LEVEL_MHZ[i]);
        mv  = mv_t'(LEVEL_MV[i]);
      end
    end
  end
endmodule
