`timescale 1ps/1fs
// voltage_regulator: behavioural model of a clock domain's on-chip voltage regulator.
//
// This is a simulation model, not synthesizable logic: the regulator is an analog block.
// It holds one of the 21 supply levels (fv_pkg) and moves between them at a fixed slew:
// the whole range, level 0 to level 20, takes FULL_RANGE_PS (1 us), so one level takes
// 50 ns. Interface (four-phase, asynchronous to any clock): when `vreq` rises the model reads
// `level`, ramps `vdd_mv` linearly from the present voltage to that level's voltage over
// |delta levels| * FULL_RANGE_PS / 20, then raises `vack`; when `vreq` falls it drops `vack`.
// `vdd_mv` is the present output voltage in millivolts, `cur_level` the last settled level.
// The 1 us full-range time and the level voltages are the published ones; the linear ramp
// and the handshake are choices of this model. Starts at level 0.
module voltage_regulator
  import fv_pkg::*;
#(
  parameter longint unsigned FULL_RANGE_PS = 1_000_000
) (
  input  logic   vreq,
  input  level_t level,
  output logic   vack,
  output level_t cur_level,
  output mv_t    vdd_mv
);
  localparam longint unsigned STEP_PS = FULL_RANGE_PS / longint'(NUM_LEVELS - 1);
  localparam int              SUBSTEPS = 10;

  initial begin
    vack      = 1'b0;
    cur_level = LEVEL_FASTEST;
    vdd_mv    = mv_t'(LEVEL_MV[0]);
  end

  always @(vreq) begin
    if (!vreq) begin
      vack = 1'b0;
    end else begin
      automatic level_t to      = (level > LEVEL_SLOWEST) ? LEVEL_SLOWEST : level;
      automatic int     from_mv = int'(LEVEL_MV[cur_level]);
      automatic int     to_mv   = int'(LEVEL_MV[to]);
      automatic int     nsteps  = (to > cur_level) ? int'(to) - int'(cur_level)
                                                   : int'(cur_level) - int'(to);
      for (int s = 1; s <= SUBSTEPS; s++) begin
        #(longint'(nsteps) * longint'(STEP_PS) / SUBSTEPS);
        vdd_mv = mv_t'(from_mv + (to_mv - from_mv) * s / SUBSTEPS);
      end
      cur_level = to;
      vack      = 1'b1;
    end
  end
endmodule
