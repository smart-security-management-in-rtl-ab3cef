// config_select: choice of the countermeasure configuration from the misuse
// level ML and the anomaly level AL.
//
// Both levels are split into five bins at 0.2, 0.4, 0.6 and 0.8. The ML bin
// picks the column and the AL bin the row of a 5x5 table of configurations.
// A low AL and a high ML select the stronger configurations, and a level
// that falls exactly on a threshold always goes to the milder side: ML bins
// are closed on the high side ([0,0.2], ]0.2,0.4], ...), AL bins on the low
// side (..., [0.6,0.8[, [0.8,1]). Purely combinational.
module config_select
  import sm_pkg::*;
(
  input  level_t  ml,    // misuse level, hundredths
  input  level_t  al,    // anomaly level, hundredths
  output config_t cfg
);

  function automatic logic [2:0] ml_bin(level_t v);
    if      (v <= level_t'(20)) return 3'd0;
    else if (v <= level_t'(40)) return 3'd1;
    else if (v <= level_t'(60)) return 3'd2;
    else if (v <= level_t'(80)) return 3'd3;
    else                        return 3'd4;
  endfunction

  function automatic logic [2:0] al_bin(level_t v);
    if      (v >= level_t'(80)) return 3'd4;
    else if (v >= level_t'(60)) return 3'd3;
    else if (v >= level_t'(40)) return 3'd2;
    else if (v >= level_t'(20)) return 3'd1;
    else                        return 3'd0;
  endfunction

  // Indexed [AL bin][ML bin]; AL bin 4 is the [0.8,1] row.
  localparam config_t S = CFG_SAFE, U = CFG_UNSAFE, C = CFG_CRITICAL, F = CFG_FATAL;
  localparam config_t TABLE [5][5] = '{
    '{U, C, C, F, F},   // AL in [0, 0.2[
    '{U, U, C, C, F},   // AL in [0.2, 0.4[
    '{U, U, U, C, F},   // AL in [0.4, 0.6[
    '{S, U, U, C, F},   // AL in [0.6, 0.8[
    '{S, S, U, C, F}    // AL in [0.8, 1]
  };

  always_comb cfg = TABLE[al_bin(al)][ml_bin(ml)];

endmodule
