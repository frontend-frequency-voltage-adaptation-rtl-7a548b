`timescale 1ps/1fs
// fv_pkg: shared types and constants of the frontend frequency-voltage adaptation.
//
// It holds the 21 frequency-voltage operating points of a clock domain (level 0 is the
// fastest, 10 GHz at 1.100 V; level 20 the slowest, 5.28 GHz at 0.501 V), and two ratio
// tables derived from them at elaboration time so that the ED2P controller never divides
// by a frequency or a voltage at run time:
//   FREQ_RATIO[n][l] = round(2^16 * f_n / f_l)        (unsigned Q.16)
//   VSQ_RATIO[l][n]  = round(2^16 * V_l^2 / V_n^2)    (unsigned Q.16)
// The operating points are the published ones; the Q.16 fixed-point format is a choice of
// this design.
package fv_pkg;

  localparam int unsigned NUM_LEVELS = 21;
  localparam int unsigned LEVEL_W    = 5;
  localparam int unsigned FRAC       = 16;          // fraction bits of all Q.16 values
  localparam int unsigned ONE        = 1 << FRAC;   // 1.0 in Q.16
  localparam int unsigned RATIO_W    = 24;          // holds ratios up to 256.0

  typedef logic [LEVEL_W-1:0] level_t;
  typedef logic [13:0]        mhz_t;                // up to 16383 MHz
  typedef logic [10:0]        mv_t;                 // up to 2047 mV

  localparam level_t LEVEL_FASTEST = level_t'(0);
  localparam level_t LEVEL_SLOWEST = level_t'(NUM_LEVELS - 1);

  // Operating points, index = level.
  localparam int unsigned LEVEL_MHZ [NUM_LEVELS] = '{
    10000, 9764, 9528, 9292, 9056, 8820, 8584, 8348, 8112, 7876, 7640,
     7404, 7168, 6932, 6696, 6460, 6224, 5988, 5752, 5516, 5280 };
  localparam int unsigned LEVEL_MV [NUM_LEVELS] = '{
     1100, 1057, 1016,  976,  938,  901,  866,  832,  800,  769,  739,
      711,  683,  657,  632,  608,  584,  562,  541,  521,  501 };

  typedef logic [NUM_LEVELS-1:0][NUM_LEVELS-1:0][RATIO_W-1:0] ratio_tab_t;

  function automatic ratio_tab_t gen_freq_ratio();
    ratio_tab_t t;
    for (int n = 0; n < NUM_LEVELS; n++)
      for (int l = 0; l < NUM_LEVELS; l++)
        t[n][l] = RATIO_W'(((longint'(LEVEL_MHZ[n]) << FRAC) + longint'(LEVEL_MHZ[l]) / 2)
                           / longint'(LEVEL_MHZ[l]));
    return t;
  endfunction

  function automatic ratio_tab_t gen_vsq_ratio();
    ratio_tab_t t;
    longint vl, vn;
    for (int l = 0; l < NUM_LEVELS; l++)
      for (int n = 0; n < NUM_LEVELS; n++) begin
        vl = longint'(LEVEL_MV[l]) * longint'(LEVEL_MV[l]);
        vn = longint'(LEVEL_MV[n]) * longint'(LEVEL_MV[n]);
        t[l][n] = RATIO_W'(((vl << FRAC) + vn / 2) / vn);
      end
    return t;
  endfunction

  localparam ratio_tab_t FREQ_RATIO = gen_freq_ratio();
  localparam ratio_tab_t VSQ_RATIO  = gen_vsq_ratio();

endpackage
